// tb_cse_block: checks the shared sub-expressions 3*d, 5*d and 15*d for
// every 14-bit input value (the operand width inside the W256 multiplier).
module tb_cse_block;

  localparam int IW = 14;

  int checks = 0, failures = 0;

  logic signed [IW-1:0] d;
  logic signed [IW+1:0] d3;
  logic signed [IW+2:0] d5;
  logic signed [IW+3:0] d15;

  cse_block #(.IW(IW)) dut (.d, .d3, .d5, .d15);

  initial begin
    for (int v = -(1 << (IW - 1)); v < (1 << (IW - 1)); v++) begin
      d = IW'(v);
      #1;
      checks++;
      if (int'(d3) != 3 * v || int'(d5) != 5 * v || int'(d15) != 15 * v) begin
        failures++;
        if (failures < 10)
          $display("d=%0d: got %0d %0d %0d", v, d3, d5, d15);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
