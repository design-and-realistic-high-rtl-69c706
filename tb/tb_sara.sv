// tb_sara: end-to-end self-check of the 32-bit accuracy reconfigurable adder.
//
// The adder is instantiated with its default parameters (32 bits, 4-bit
// sub-adders, every boundary switched by sel), so this bench runs the full
// design. Each vector is held for one cycle of a testbench clock and the
// sum is compared with two independent reference values:
//   - accurate mode (sel = 1): the integer sum a + b + cin;
//   - approximate mode (sel = 0): a slice-by-slice sum in which the carry
//     into every sub-adder above the lowest is replaced by the generate
//     term of the top bit of the slice below (a & b at that bit).
// Also checked: an approximate sum never exceeds the exact one, and the
// difference is a sum of distinct sub-adder weights 2^(4k) (one lost carry
// per boundary at most). The two operand pairs of the published simulation
// waveform are replayed first. Counters record that every mechanism
// occurred: both modes, mode switches, a predicted carry of 1, a missed
// carry, a correct approximate result, a carry out and a carry in; each one
// that never happened counts as a failure. For uniformly random operands
// the bench prints the error rate, mean error distance and mean relative
// error of approximate mode. A watchdog ends a stuck run.
module tb_sara;

  import sara_pkg::*;

  localparam int unsigned N     = SARA_N;
  localparam int unsigned SUB_W = SARA_SUB_W;
  localparam int unsigned NSUB  = N / SUB_W;
  localparam int unsigned NRAND = 200000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] a, b;
  logic         cin;
  sara_mode_e   mode;
  logic [N:0]   sout;

  sara dut (.a(a), .b(b), .cin(cin), .sel(mode), .sout(sout));

  // mechanism counters
  int n_accurate = 0, n_approx = 0, n_switch = 0, n_prdt_one = 0;
  int n_missed = 0, n_approx_exact = 0, n_cout = 0, n_cin = 0;

  // error statistics of approximate mode over the random vectors
  real err_sum = 0.0, rel_err_sum = 0.0;
  int  n_rand_approx = 0, n_rand_wrong = 0;
  bit  in_random = 1'b0;

  initial begin : watchdog
    repeat (2 * NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N:0] ref_sum(logic [N-1:0] x, logic [N-1:0] y,
                                         logic ci, logic approx);
    logic [N:0]      r;
    logic [SUB_W:0]  t;
    logic            c;
    c = ci;
    for (int k = 0; k < int'(NSUB); k++) begin
      if (approx && k > 0) c = x[k*SUB_W-1] & y[k*SUB_W-1];
      t = {1'b0, x[k*SUB_W +: SUB_W]} + {1'b0, y[k*SUB_W +: SUB_W]} + {{SUB_W{1'b0}}, c};
      r[k*SUB_W +: SUB_W] = t[SUB_W-1:0];
      c = t[SUB_W];
    end
    r[N] = c;
    return r;
  endfunction

  // true when d is a sum of distinct weights 2^(SUB_W*k), k >= 1
  function automatic bit lost_carry_pattern(logic [N:0] d);
    for (int i = 0; i <= int'(N); i++)
      if (d[i] && (i % int'(SUB_W) != 0 || i == 0)) return 1'b0;
    return 1'b1;
  endfunction

  sara_mode_e last_mode = SARA_ACCURATE;

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y, logic ci, sara_mode_e m);
    logic [N:0] exact, expv, diff;
    a = x; b = y; cin = ci; mode = m;
    @(posedge clk);
    exact = {1'b0, x} + {1'b0, y} + {{N{1'b0}}, ci};
    expv  = (m == SARA_APPROX) ? ref_sum(x, y, ci, 1'b1) : exact;
    checks++;
    if (sout !== expv) begin
      failures++;
      $display("FAIL mode=%s a=%h b=%h cin=%b got %h exp %h", m.name(), x, y, ci, sout, expv);
    end
    checks++;
    diff = exact - sout;
    if (sout > exact || !lost_carry_pattern(diff) && diff != 0) begin
      failures++;
      $display("FAIL error shape a=%h b=%h cin=%b got %h exact %h", x, y, ci, sout, exact);
    end
    if (m != last_mode) n_switch++;
    last_mode = m;
    if (m == SARA_ACCURATE) n_accurate++;
    else begin
      n_approx++;
      for (int k = 1; k < int'(NSUB); k++)
        if (x[k*SUB_W-1] & y[k*SUB_W-1]) begin n_prdt_one++; break; end
      if (expv != exact) n_missed++;
      else n_approx_exact++;
      if (in_random) begin
        n_rand_approx++;
        if (sout != exact) n_rand_wrong++;
        err_sum += real'(exact - sout);
        if (exact != 0) rel_err_sum += real'(exact - sout) / real'(exact);
      end
    end
    if (sout[N]) n_cout++;
    if (ci) n_cin++;
  endtask

  task automatic expect_value(logic [N:0] v, string what);
    checks++;
    if (sout !== v) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, sout, v);
    end
  endtask

  initial begin : stimulus
    // Published waveform: 350 + 106 = 456 with sel = 1, then 10 + 30 = 40.
    apply(N'(350), N'(106), 1'b0, SARA_ACCURATE);
    expect_value((N+1)'(456), "waveform vector 1");
    apply(N'(10), N'(30), 1'b0, SARA_ACCURATE);
    expect_value((N+1)'(40), "waveform vector 2 accurate");
    apply(N'(10), N'(30), 1'b0, SARA_APPROX);
    expect_value((N+1)'(40), "waveform vector 2 approximate");

    // A carry that ripples across a boundary is lost in approximate mode
    // (0xF + 1: the top bit of the lowest slice does not generate) ...
    apply(N'(32'h0000_000F), N'(1), 1'b0, SARA_APPROX);
    expect_value((N+1)'(0), "missed carry, approximate");
    apply(N'(32'h0000_000F), N'(1), 1'b0, SARA_ACCURATE);
    expect_value((N+1)'(16), "same carry, accurate");
    // ... and a full-length ripple stops at the first boundary: the upper
    // slices see a predicted carry of 0 and keep their all-ones pattern.
    apply('1, N'(1), 1'b0, SARA_APPROX);
    expect_value({1'b0, {(N-SUB_W){1'b1}}, {SUB_W{1'b0}}}, "all-ones + 1, approximate");
    apply('1, N'(1), 1'b0, SARA_ACCURATE);
    expect_value({1'b1, {N{1'b0}}}, "all-ones + 1, accurate");
    // A generated carry at a slice's top bit is predicted correctly.
    apply(N'(32'h0000_0808), N'(32'h0000_0808), 1'b0, SARA_APPROX);
    expect_value((N+1)'(32'h0000_1010), "predicted carries");
    apply('1, '1, 1'b1, SARA_APPROX);
    expect_value({1'b1, {N{1'b1}}}, "all-ones + all-ones + 1, approximate");

    // uniformly random operands; error statistics are taken over these
    in_random = 1'b1;
    for (int n = 0; n < int'(NRAND); n++)
      apply(N'($urandom), N'($urandom), 1'($urandom), sara_mode_e'($urandom % 2));
    in_random = 1'b0;
    // operands whose carries ripple far
    for (int n = 0; n < int'(NRAND) / 8; n++) begin
      logic [N-1:0] x;
      x = N'($urandom);
      apply(x, ~x ^ N'(1 << ($urandom % N)), 1'($urandom), sara_mode_e'($urandom % 2));
    end
    $display("approximate mode, uniform operands: error rate %0.4f, mean error distance %0.1f, mean relative error %0.6f",
             real'(n_rand_wrong) / real'(n_rand_approx), err_sum / real'(n_rand_approx),
             rel_err_sum / real'(n_rand_approx));

    $display("mechanisms: accurate=%0d approximate=%0d switches=%0d predicted_one=%0d missed_carry=%0d approx_exact=%0d carry_out=%0d carry_in=%0d",
             n_accurate, n_approx, n_switch, n_prdt_one, n_missed, n_approx_exact, n_cout, n_cin);
    if (n_accurate == 0)     begin failures++; $display("FAIL accurate mode never used"); end
    if (n_approx == 0)       begin failures++; $display("FAIL approximate mode never used"); end
    if (n_switch == 0)       begin failures++; $display("FAIL mode never switched"); end
    if (n_prdt_one == 0)     begin failures++; $display("FAIL no carry predicted"); end
    if (n_missed == 0)       begin failures++; $display("FAIL no missed carry"); end
    if (n_approx_exact == 0) begin failures++; $display("FAIL approximate never exact"); end
    if (n_cout == 0)         begin failures++; $display("FAIL no carry out"); end
    if (n_cin == 0)          begin failures++; $display("FAIL no carry in"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
