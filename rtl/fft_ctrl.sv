// fft_ctrl: frame position counter of the SDF FFT.
//
// Counts accepted input samples modulo N and presents, alongside each
// sample, its position within the current N-point frame. In this pipeline
// the position travels with the data as a sideband from stage to stage, and
// every stage derives its own control from it: whether the butterfly is in
// its fill or compute half, whether the BF2 stage applies -j, and which
// twiddle factor a multiplier applies. 'frame_start' marks position 0.
//
// Timing: 'pos' is combinational from the counter and belongs to the sample
// offered on the same cycle; the counter moves on after an accepted sample
// (in_valid high). Reset starts a new frame. The design description only
// says that control signals switch the butterfly types and select the
// twiddles; the single counter with a travelling position is this design's
// own arrangement.
module fft_ctrl #(
  parameter int unsigned LOG2N = fft_pkg::FFT_LOG2N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic [LOG2N-1:0] pos,
  output logic             frame_start
);

  logic [LOG2N-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (in_valid) cnt <= cnt + 1'b1;
  end

  assign pos         = cnt;
  assign frame_start = (cnt == '0);

endmodule
