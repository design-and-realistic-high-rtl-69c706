// tb_sara_subadder: exhaustive self-check of the ripple-carry sub-adder.
//
// Drives every combination of a, b and ci for the default 4-bit slice and,
// with a second instance, random values for an 8-bit slice, and compares
// {co, s} against the integer sum a + b + ci. A free-running clock bounds
// the run: a watchdog counts a failure if the checks do not finish.
module tb_sara_subadder;

  localparam int unsigned W4 = 4;
  localparam int unsigned W8 = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [W4-1:0] a4, b4, s4;
  logic          ci4, co4;
  logic [W8-1:0] a8, b8, s8;
  logic          ci8, co8;

  sara_subadder dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  sara_subadder #(.W(W8)) dut8 (.a(a8), .b(b8), .ci(ci8), .s(s8), .co(co8));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned exp;
    for (int ia = 0; ia < 16; ia++)
      for (int ib = 0; ib < 16; ib++)
        for (int ic = 0; ic < 2; ic++) begin
          a4 = ia[W4-1:0]; b4 = ib[W4-1:0]; ci4 = ic[0];
          @(posedge clk);
          exp = ia + ib + ic;
          checks++;
          if ({co4, s4} != exp[W4:0]) begin
            failures++;
            $display("FAIL W4 a=%0d b=%0d ci=%0d got %0d exp %0d", ia, ib, ic, {co4, s4}, exp);
          end
        end
    for (int n = 0; n < 2000; n++) begin
      a8 = W8'($urandom); b8 = W8'($urandom); ci8 = 1'($urandom);
      @(posedge clk);
      exp = 32'(a8) + 32'(b8) + 32'(ci8);
      checks++;
      if ({co8, s8} != exp[W8:0]) begin
        failures++;
        $display("FAIL W8 a=%0d b=%0d ci=%0d got %0d exp %0d", a8, b8, ci8, {co8, s8}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
