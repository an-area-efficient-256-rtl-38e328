// delay_buffer: feedback delay line of one single-path delay feedback stage.
//
// Holds DEPTH words and advances only when 'en' is high: on such a cycle
// 'dout' shows the word written DEPTH enabled cycles earlier, and 'din' is
// stored in its place. It is a circular buffer (one array plus a write/read
// pointer) rather than a shift register, so that long lines (128 words in
// the first stage of the 256-point FFT) map onto RAM. DEPTH = 1 degenerates
// to a single register. 'dout' is combinational from the array and the
// pointer; it is meaningless until DEPTH words have been written.
//
// The FFT uses lines of 128, 64, 32, 16, 8, 4, 2 and 1 words as its
// design description prescribes; the RAM-style circular organisation and
// the enable are this implementation's choice.
module delay_buffer #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (en) begin
      if (ptr == AW'(DEPTH - 1)) ptr <= '0;
      else                       ptr <= ptr + 1'b1;
    end
  end

endmodule
