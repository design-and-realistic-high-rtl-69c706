// tb_sara_carry_predict: exhaustive self-check of the boundary carry predictor.
//
// The predicted carry must be 1 exactly when the predictor is enabled
// (config_n = 1) and both top operand bits of the lower sub-adder are 1.
// All eight input combinations are driven, each held for one cycle of a
// testbench clock; a watchdog ends the run if it stalls.
module tb_sara_carry_predict;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic a_msb, b_msb, config_n, c_prdt;

  sara_carry_predict dut (.a_msb(a_msb), .b_msb(b_msb), .config_n(config_n), .c_prdt(c_prdt));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic exp;
    for (int v = 0; v < 8; v++) begin
      {config_n, a_msb, b_msb} = v[2:0];
      @(posedge clk);
      // truth table: only 3'b111 predicts a carry
      exp = (v == 7);
      checks++;
      if (c_prdt !== exp) begin
        failures++;
        $display("FAIL config_n=%b a=%b b=%b got %b exp %b", config_n, a_msb, b_msb, c_prdt, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
