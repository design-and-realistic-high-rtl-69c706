// tb_sara_carry_mux: exhaustive self-check of the boundary carry select.
//
// With config_i = 1 the mux must pass the accurate carry, with config_i = 0
// the predicted one. All eight input combinations are driven, one per
// cycle of a testbench clock; a watchdog ends the run if it stalls.
module tb_sara_carry_mux;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic c_acc, c_prdt, config_i, c_out;

  sara_carry_mux dut (.c_acc(c_acc), .c_prdt(c_prdt), .config_i(config_i), .c_out(c_out));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    // expected c_out for {config_i, c_acc, c_prdt} = 0..7
    static logic [7:0] table_exp = 8'b1100_1010;
    for (int v = 0; v < 8; v++) begin
      {config_i, c_acc, c_prdt} = v[2:0];
      @(posedge clk);
      checks++;
      if (c_out !== table_exp[v]) begin
        failures++;
        $display("FAIL config=%b acc=%b prdt=%b got %b exp %b", config_i, c_acc, c_prdt, c_out, table_exp[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
