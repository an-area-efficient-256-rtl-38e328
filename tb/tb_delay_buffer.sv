// tb_delay_buffer: checks the feedback delay line at two depths (a RAM-like
// depth of 16 and the single-register depth of 1). Random words are written
// with a random enable; whenever the enable is high the output must equal
// the word written DEPTH enabled cycles before (checked once DEPTH words
// are in), and a cycle with the enable low must leave the output unchanged.
module tb_delay_buffer;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        en16 = 1'b0, en1 = 1'b0;
  logic [23:0] din16 = '0, din1 = '0;
  logic [23:0] dout16, dout1;

  delay_buffer #(.DEPTH(16), .WIDTH(24)) dut16 (
    .clk, .rst_n, .en(en16), .din(din16), .dout(dout16));
  delay_buffer #(.DEPTH(1), .WIDTH(24)) dut1 (
    .clk, .rst_n, .en(en1), .din(din1), .dout(dout1));

  logic [23:0] hist16 [$];
  logic [23:0] hist1 [$];
  logic [23:0] held16;
  logic        prev_en16 = 1'b1;

  // Reference: a queue of the words written so far.
  always @(posedge clk) begin
    if (rst_n) begin
      if (en16) begin
        if (hist16.size() >= 16) begin
          checks++;
          if (dout16 !== hist16[hist16.size() - 16]) begin
            failures++;
            $display("depth 16: got %h expected %h", dout16, hist16[hist16.size() - 16]);
          end
        end
        hist16.push_back(din16);
      end
      // a disabled edge must leave the line untouched
      if (!prev_en16 && hist16.size() >= 16) begin
        checks++;
        if (dout16 !== held16) begin
          failures++;
          $display("depth 16: output moved while disabled");
        end
      end
      held16    = dout16;
      prev_en16 = en16;
      if (en1) begin
        if (hist1.size() >= 1) begin
          checks++;
          if (dout1 !== hist1[hist1.size() - 1]) begin
            failures++;
            $display("depth 1: got %h expected %h", dout1, hist1[hist1.size() - 1]);
          end
        end
        hist1.push_back(din1);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (600) begin
      @(posedge clk);
      en16  <= ($urandom_range(3) != 0);
      en1   <= ($urandom_range(3) != 0);
      din16 <= 24'($urandom);
      din1  <= 24'($urandom);
    end
    @(posedge clk);
    en16 <= 1'b0;
    en1  <= 1'b0;
    repeat (2) @(posedge clk);
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
