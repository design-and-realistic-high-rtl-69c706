// tb_sara_12bit: the 12-bit, three-sub-adder configuration of the adder.
//
// This is the small example used to explain the structure: bits 0-3, 4-7
// and 8-11 form three 4-bit sub-adders with two boundaries. Two instances
// are checked side by side:
//   - u_all: sel switches both boundaries (APPROX_MASK = 2'b11);
//   - u_low: sel switches only the lower boundary (APPROX_MASK = 2'b01),
//     so in approximate mode bits 8-11 take the accurate carry out of
//     bits 4-7, which itself starts from the predicted carry at bit 3.
// Each vector is compared with a slice-by-slice reference sum. In
// approximate mode the bench also checks that the carry chain is cut:
// changing cin and operand bits 0-2 must leave sum bits 4-12 unchanged
// for both instances. Counters make sure both modes, predicted carries
// of 1, missed carries and the chain cut all occurred.
module tb_sara_12bit;

  localparam int unsigned N     = 12;
  localparam int unsigned SUB_W = 4;
  localparam int unsigned NSUB  = N / SUB_W;
  localparam int unsigned NRAND = 100000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] a, b;
  logic         cin, sel;
  logic [N:0]   s_all, s_low;

  sara #(.N(N), .SUB_W(SUB_W), .APPROX_MASK(2'b11)) u_all (
    .a(a), .b(b), .cin(cin), .sel(sel), .sout(s_all));
  sara #(.N(N), .SUB_W(SUB_W), .APPROX_MASK(2'b01)) u_low (
    .a(a), .b(b), .cin(cin), .sel(sel), .sout(s_low));

  int n_accurate = 0, n_approx = 0, n_prdt_one = 0, n_missed_all = 0;
  int n_missed_low = 0, n_cut = 0;

  initial begin : watchdog
    repeat (3 * NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mask bit k-1 enables prediction at boundary k (k = 1, 2)
  function automatic logic [N:0] ref_sum(logic [N-1:0] x, logic [N-1:0] y,
                                         logic ci, logic approx, logic [1:0] mask);
    logic [N:0]     r;
    logic [SUB_W:0] t;
    logic           c;
    c = ci;
    for (int k = 0; k < int'(NSUB); k++) begin
      if (approx && k > 0 && mask[k-1]) c = x[k*SUB_W-1] & y[k*SUB_W-1];
      t = {1'b0, x[k*SUB_W +: SUB_W]} + {1'b0, y[k*SUB_W +: SUB_W]} + {{SUB_W{1'b0}}, c};
      r[k*SUB_W +: SUB_W] = t[SUB_W-1:0];
      c = t[SUB_W];
    end
    r[N] = c;
    return r;
  endfunction

  task automatic compare(logic [N:0] got, logic [N:0] expv, string who);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %s sel=%b a=%h b=%h cin=%b got %h exp %h", who, sel, a, b, cin, got, expv);
    end
  endtask

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y, logic ci, logic s);
    logic [N:0] e_all, e_low, exact;
    a = x; b = y; cin = ci; sel = s;
    @(posedge clk);
    exact = {1'b0, x} + {1'b0, y} + {{N{1'b0}}, ci};
    e_all = ref_sum(x, y, ci, !s, 2'b11);
    e_low = ref_sum(x, y, ci, !s, 2'b01);
    compare(s_all, e_all, "mask=11");
    compare(s_low, e_low, "mask=01");
    if (s) n_accurate++;
    else begin
      n_approx++;
      if (x[3] & y[3]) n_prdt_one++;
      if (e_all != exact) n_missed_all++;
      if (e_low != exact) n_missed_low++;
    end
  endtask

  initial begin : stimulus
    // text example operands of the structure: a carry generated at bit 3
    // and propagated through bits 4-7 into bits 8-11
    apply(12'h0F8, 12'h008, 1'b0, 1'b0);
    compare(s_low, 13'h100, "predicted carry rippled through the middle slice");
    compare(s_all, 13'h000, "middle slice carry cut by prediction");
    apply(12'h0F8, 12'h008, 1'b0, 1'b1);
    compare(s_all, 13'h100, "accurate");

    for (int n = 0; n < int'(NRAND); n++) begin
      logic [N-1:0] x, y;
      logic [N:SUB_W] up_all, up_low;
      logic         ci, s;
      x = N'($urandom); y = N'($urandom); ci = 1'($urandom); s = 1'($urandom);
      if (n % 4 == 1) y = ~x ^ N'(1 << ($urandom % N));
      apply(x, y, ci, s);
      if (!s) begin
        up_all = s_all[N:SUB_W]; up_low = s_low[N:SUB_W];
        apply({x[N-1:3], 3'($urandom)}, {y[N-1:3], 3'($urandom)}, ~ci, 1'b0);
        checks++;
        if (s_all[N:SUB_W] !== up_all || s_low[N:SUB_W] !== up_low) begin
          failures++;
          $display("FAIL chain not cut at bit 3: a=%h b=%h", x, y);
        end else n_cut++;
      end
    end

    $display("mechanisms: accurate=%0d approximate=%0d predicted_one=%0d missed_all=%0d missed_low=%0d chain_cut=%0d",
             n_accurate, n_approx, n_prdt_one, n_missed_all, n_missed_low, n_cut);
    if (n_accurate == 0)   begin failures++; $display("FAIL accurate mode never used"); end
    if (n_approx == 0)     begin failures++; $display("FAIL approximate mode never used"); end
    if (n_prdt_one == 0)   begin failures++; $display("FAIL no carry predicted"); end
    if (n_missed_all == 0) begin failures++; $display("FAIL no missed carry (mask 11)"); end
    if (n_missed_low == 0) begin failures++; $display("FAIL no missed carry (mask 01)"); end
    if (n_cut == 0)        begin failures++; $display("FAIL chain cut never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
