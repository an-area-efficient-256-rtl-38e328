// tb_fft_ctrl: checks the frame position counter. With a random input
// enable, 'pos' must equal the number of accepted samples modulo 256 and
// 'frame_start' must be high exactly at position 0; reset restarts at 0.
module tb_fft_ctrl;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       in_valid = 1'b0;
  logic [7:0] pos;
  logic       frame_start;

  fft_ctrl dut (.clk, .rst_n, .in_valid, .pos, .frame_start);

  int accepted = 0;
  int starts = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (int'(pos) != accepted % 256 || frame_start != (accepted % 256 == 0)) begin
        failures++;
        $display("pos %0d start %0b after %0d accepted", pos, frame_start, accepted);
      end
      if (in_valid) begin
        if (frame_start) starts++;
        accepted++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (1200) begin
      @(posedge clk);
      in_valid <= ($urandom_range(4) != 0);
    end
    @(posedge clk);
    in_valid <= 1'b0;
    @(posedge clk);
    checks++;
    if (starts < 3) begin
      failures++;
      $display("only %0d frame starts seen", starts);
    end
    // reset in mid-frame restarts at position 0
    rst_n <= 1'b0;
    @(posedge clk);
    accepted = 0;
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
