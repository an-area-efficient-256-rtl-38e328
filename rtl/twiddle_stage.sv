// twiddle_stage: pipeline stage that multiplies the stream by the twiddle
// factor its frame position calls for, using one of the two multiplier-less
// constant complex multipliers.
//
//  * KIND = TW_W16: the factor W16^e after a radix-2^2 butterfly pair,
//    e = w16_exponent(in_pos[LSB+3:LSB]) (LSB = 4 after stage 2, LSB = 0
//    after stage 6 of the 256-point FFT).
//  * KIND = TW_W256: the factor W256^e after stage 4,
//    e = w256_exponent(in_pos).
//
// The exponent is computed from the position that travels with each
// sample, so the stage needs no counter of its own. Timing: one register;
// an accepted sample appears at the output one cycle later with the same
// position. The twiddle placement follows the radix-2^4 plan of the design
// description; the registered stage is this implementation's choice.
module twiddle_stage #(
  parameter fft_pkg::tw_kind_e KIND = fft_pkg::TW_W16,
  parameter int unsigned       LSB  = 4,
  parameter int unsigned       W    = fft_pkg::DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [7:0]          in_pos,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic [7:0]          out_pos,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  logic signed [W-1:0] m_re, m_im;

  if (KIND == fft_pkg::TW_W16) begin : g_w16
    logic [3:0] e;
    assign e = fft_pkg::w16_exponent(in_pos[LSB+3:LSB]);
    csd_w16_mult #(.W(W)) u_mult (
      .e(e), .in_re(in_re), .in_im(in_im), .out_re(m_re), .out_im(m_im)
    );
    // Only the seven exponents the multiplier provides can occur.
    always_comb begin
      if (in_valid)
        assert (e inside {4'd0, 4'd1, 4'd2, 4'd3, 4'd4, 4'd6, 4'd9})
          else $error("twiddle_stage: W16 exponent %0d out of range", e);
    end
  end else begin : g_w256
    logic [7:0] e;
    assign e = fft_pkg::w256_exponent(in_pos);
    csd_w256_mult #(.W(W)) u_mult (
      .e(e), .in_re(in_re), .in_im(in_im), .out_re(m_re), .out_im(m_im)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pos   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pos <= in_pos;
        out_re  <= m_re;
        out_im  <= m_im;
      end
    end
  end

endmodule
