// sdf_butterfly: one radix-2 single-path delay feedback (SDF) stage,
// butterfly type BF1 or BF2, with its feedback delay line of D words.
//
// Operation, per frame position 'in_pos' of the incoming sample:
//  * fill half (bit log2(D) of in_pos is 0): the sample is written into the
//    delay line, and the word leaving the line (a difference computed D
//    samples earlier) is sent out;
//  * compute half (that bit is 1): the word leaving the line, u, was
//    received D samples earlier; with the incoming sample v the stage
//    sends out (u + v)/2 and writes (u - v)/2 back into the line.
//  A BF2 stage first multiplies v by -j (swap real and imaginary part,
//  negate the new imaginary part) when bit log2(D)+1 of in_pos is also 1:
//  that is the trivial twiddle (-j)^(a*k) of the radix-2^2 decomposition.
//
// Every butterfly halves its result, so the 8-stage FFT delivers X(k)/N in
// the same W-bit word length and cannot overflow in the butterflies.
//
// Interface and timing: the stage advances only on in_valid. The output is
// registered: one cycle after an accepted sample with position t, out_valid
// is high with out_pos = t - D (mod 2^PW), the position (in this stage's
// output order) of the result sent out. The first D samples after reset
// only fill the line and produce no output. An assertion checks that the
// positions arrive in order, 0, 1, 2, ... from reset, one per accepted
// sample.
//
// The BF1/BF2 pairing and the delay lengths follow the design description;
// the scaling by 1/2, the truncating shift and the sideband position are
// this implementation's choices.
module sdf_butterfly #(
  parameter int unsigned      D     = 128,
  parameter int unsigned      W     = fft_pkg::DATA_W,
  parameter int unsigned      PW    = fft_pkg::FFT_LOG2N,
  parameter fft_pkg::bf_type_e BTYPE = fft_pkg::BF1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [PW-1:0]       in_pos,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic [PW-1:0]       out_pos,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned LD = $clog2(D);

  // -j needs the next higher position bit, so a BF2 stage needs 2*D <= 2^PW.
  if (BTYPE == fft_pkg::BF2 && LD + 1 >= PW) begin : g_bad_cfg
    $error("sdf_butterfly: BF2 needs PW > log2(D) + 1");
  end

  logic                compute;     // second half of a 2*D block
  logic                rot;         // BF2: apply -j to the incoming sample
  logic signed [W:0]   v_re, v_im;  // incoming sample after optional -j
  logic signed [W-1:0] u_re, u_im;  // word leaving the delay line
  logic signed [W:0]   sum_re, sum_im, dif_re, dif_im;
  logic [2*W-1:0]      fb_in, fb_out;
  logic signed [W-1:0] nxt_re, nxt_im;
  logic                primed;

  assign compute = in_pos[LD];
  if (BTYPE == fft_pkg::BF2) begin : g_bf2
    assign rot = compute & in_pos[LD+1];
  end else begin : g_bf1
    assign rot = 1'b0;
  end

  assign {u_re, u_im} = fb_out;

  always_comb begin
    if (rot) begin
      v_re = (W+1)'(in_im);
      v_im = -(W+1)'(in_re);
    end else begin
      v_re = (W+1)'(in_re);
      v_im = (W+1)'(in_im);
    end
    sum_re = (W+1)'(u_re) + v_re;
    sum_im = (W+1)'(u_im) + v_im;
    dif_re = (W+1)'(u_re) - v_re;
    dif_im = (W+1)'(u_im) - v_im;
    if (compute) begin
      nxt_re = sum_re[W:1];
      nxt_im = sum_im[W:1];
      fb_in  = {dif_re[W:1], dif_im[W:1]};
    end else begin
      nxt_re = u_re;
      nxt_im = u_im;
      fb_in  = {in_re, in_im};
    end
  end

  delay_buffer #(.DEPTH(D), .WIDTH(2*W)) u_line (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .din  (fb_in),
    .dout (fb_out)
  );

  // Stream rule: positions arrive in order, one per accepted sample,
  // starting from 0 after reset.
  logic [PW-1:0] exp_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_pos <= '0;
    end else if (in_valid) begin
      assert (in_pos == exp_pos)
        else $error("sdf_butterfly: position %0d, expected %0d", in_pos, exp_pos);
      exp_pos <= in_pos + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_pos   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid & primed;
      if (in_valid) begin
        if (in_pos == PW'(D - 1)) primed <= 1'b1;
        out_pos <= in_pos - PW'(D);
        out_re  <= nxt_re;
        out_im  <= nxt_im;
      end
    end
  end

endmodule
