// fft256_sdf: 256-point radix-2^4 single-path delay feedback (SDF) FFT
// with multiplier-less twiddle multiplication.
//
// Structure (input side first):
//   fft_ctrl -> BF1(128) -> BF2(64) -> xW16 -> BF1(32) -> BF2(16) -> xW256
//            -> BF1(8)   -> BF2(4)  -> xW16 -> BF1(2)  -> BF2(1)  -> out
// Radix-2^4 places the non-trivial twiddles only after stages 2, 4 and 6;
// the trivial -j factors after stages 1, 3, 5 and 7 are folded into the
// following BF2 butterflies. The W16 factors (seven distinct values) and
// the W256 factors come from CSD shift-and-add constant multipliers, so
// no coefficient memory is needed.
//
// Interface: one complex sample per clock when in_valid is high, natural
// order, frames of 256 samples back to back starting at reset; in_valid
// low stalls the input and the gap travels down the pipeline as a bubble.
// Output: out_valid marks one complex result per cycle, X(k)/256 with
// k = out_k; the results of a frame leave in bit-reversed order of k
// (out_pos counts 0..255 through the frame, out_k = bitrev(out_pos)).
// With a continuous input, X(0) of a frame leaves 11 cycles after the last
// sample of that frame was accepted (8 butterfly and 3 multiplier
// registers); the rest of the frame follows one per accepted input sample,
// so the last frame is pushed out by 255 further input samples.
//
// The stage plan, butterfly types, delay lengths, the 12-bit word length
// and the CSD twiddle multipliers follow the design description. Scaling
// by 1/2 in every butterfly, rounding, saturation in the multipliers, the
// stall behaviour and the bit-reversed output without reordering buffer
// are this implementation's choices.
module fft256_sdf #(
  parameter int unsigned W = fft_pkg::DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                in_frame_start,
  output logic                out_valid,
  output logic [7:0]          out_pos,
  output logic [7:0]          out_k,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  import fft_pkg::*;

  // Stream between stages: index 0 = input, 1..8 = after butterfly s,
  // t2/t4/t6 = after the twiddle stage that follows butterfly 2, 4, 6.
  logic                v   [9];
  logic [7:0]          pos [9];
  logic signed [W-1:0] re  [9];
  logic signed [W-1:0] im  [9];

  logic                tv   [3];
  logic [7:0]          tpos [3];
  logic signed [W-1:0] tre  [3];
  logic signed [W-1:0] tim  [3];

  fft_ctrl #(.LOG2N(FFT_LOG2N)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .pos        (pos[0]),
    .frame_start(in_frame_start)
  );

  assign v[0]  = in_valid;
  assign re[0] = in_re;
  assign im[0] = in_im;

  // Butterfly s (1..8) has delay 256 >> s; odd s are BF1, even s BF2.
  // Its input is the previous butterfly, or a twiddle stage after s = 2,4,6.
  for (genvar s = 1; s <= 8; s++) begin : g_stage
    logic                iv;
    logic [7:0]          ipos;
    logic signed [W-1:0] ire, iim;

    if (s == 3 || s == 5 || s == 7) begin : g_from_tw
      assign iv   = tv[(s-3)/2];
      assign ipos = tpos[(s-3)/2];
      assign ire  = tre[(s-3)/2];
      assign iim  = tim[(s-3)/2];
    end else begin : g_from_bf
      assign iv   = v[s-1];
      assign ipos = pos[s-1];
      assign ire  = re[s-1];
      assign iim  = im[s-1];
    end

    sdf_butterfly #(
      .D    (FFT_N >> s),
      .W    (W),
      .PW   (FFT_LOG2N),
      .BTYPE((s % 2 == 0) ? BF2 : BF1)
    ) u_bf (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (iv),
      .in_pos   (ipos),
      .in_re    (ire),
      .in_im    (iim),
      .out_valid(v[s]),
      .out_pos  (pos[s]),
      .out_re   (re[s]),
      .out_im   (im[s])
    );
  end

  // Twiddle stages after butterflies 2 (W16), 4 (W256) and 6 (W16).
  for (genvar t = 0; t < 3; t++) begin : g_tw
    localparam int unsigned SRC = 2 * t + 2;
    twiddle_stage #(
      .KIND((t == 1) ? TW_W256 : TW_W16),
      .LSB ((t == 0) ? 4 : 0),
      .W   (W)
    ) u_tw (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[SRC]),
      .in_pos   (pos[SRC]),
      .in_re    (re[SRC]),
      .in_im    (im[SRC]),
      .out_valid(tv[t]),
      .out_pos  (tpos[t]),
      .out_re   (tre[t]),
      .out_im   (tim[t])
    );
  end

  assign out_valid = v[8];
  assign out_pos   = pos[8];
  assign out_k     = bitrev8(pos[8]);
  assign out_re    = re[8];
  assign out_im    = im[8];

endmodule
