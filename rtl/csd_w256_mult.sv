// csd_w256_mult: cascade CSD constant complex multiplier by W256^e,
// W256 = exp(-j*2*pi/256), e = 0..255, without a coefficient table.
//
// How it works, for an exponent e:
//  1. 1/8 symmetry. Write e = 64*Q + s (Q = quadrant, s = 0..63). For
//     s <= 32 the reduced exponent is p = s. For s > 32, p = 64 - s and
//     W^s = -j * conj(W^p), so the input is conjugated before and the
//     product conjugated after the multiplication ("mirror"). The factor
//     W^(64*Q) = (-j)^Q, together with the -j of a mirrored exponent, is
//     a trivial rotation at the output (swap and negate).
//  2. p = 0..32 is split as p = 4*p1 + p2 (p1 = 0..8, p2 = 0..3), and
//     W^p = W^(4*p1) * W^p2 is applied as two complex multiplications in
//     cascade, so only 9 + 4 constant pairs (cos, sin) exist instead of 33.
//  3. Each real x real product is a constant multiplication realised as a
//     CSD shift-and-add network (csd_const_mult) with 11-fraction-bit
//     constants. The sub-expressions 3d, 5d and 15d (CSD patterns 1 0 -1,
//     1 0 1, 1 0 0 0 -1) are formed once per input component (cse_block)
//     and shared by all constants of that stage. The stage selects the wanted product with a multiplexer
//     indexed by p1 (first stage) or p2 (second stage), adds the two
//     partial products of each output component and rounds to an integer.
//
// Interface: purely combinational; W-bit signed input, W-bit signed
// output, rounded to nearest after each stage of the cascade and
// saturated at the end (a 45-degree rotation can grow one component by up
// to sqrt(2)).
//
// The symmetry reduction, the p = 4*p1 + p2 cascade and the multiplier-less
// CSD realisation follow the design description. The order of the trivial
// rotations, the rounding points, the two guard bits between the cascade
// stages, the saturation, the order in which the CSE patterns are matched
// and the multiplexer arrangement are this implementation's choices.
module csd_w256_mult #(
  parameter int unsigned W = fft_pkg::DATA_W
) (
  input  logic [7:0]          e,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned F  = fft_pkg::COEF_F; // constant fraction bits
  localparam int unsigned KW = F + 2;           // 2048 needs 13 bits signed
  localparam int unsigned IW = W + 2;           // operand width in cascade
  localparam int unsigned PW = IW + KW;         // product width
  localparam int unsigned SW = PW + 1;          // sum of two products

  typedef logic signed [IW-1:0] iw_t;
  typedef logic signed [PW-1:0] pw_t;
  typedef logic signed [SW-1:0] sw_t;

  // ---------------------------------------------------------------- step 1
  logic [1:0] quad;
  logic [5:0] s;
  logic       mirror;
  logic [5:0] p;
  logic [3:0] p1;
  logic [1:0] p2;
  iw_t        a0, b0;

  always_comb begin
    quad   = e[7:6];
    s      = e[5:0];
    mirror = (s > 6'd32);
    p      = mirror ? 6'(7'd64 - 7'(s)) : s;
    p1     = p[5:2];
    p2     = p[1:0];
    a0     = iw_t'(in_re);
    b0     = mirror ? -iw_t'(in_im) : iw_t'(in_im);
  end

  function automatic iw_t round_int(sw_t x);
    sw_t r;
    r = (x + (sw_t'(1) <<< (F - 1))) >>> F;
    return r[IW-1:0];
  endfunction

  // ---------------------------------------------------- step 2a: W^(4*p1)
  // Shared sub-expressions 3d, 5d, 15d of each input component.
  logic signed [IW+1:0] a0_3, b0_3, a1_3, b1_3;
  logic signed [IW+2:0] a0_5, b0_5, a1_5, b1_5;
  logic signed [IW+3:0] a0_15, b0_15, a1_15, b1_15;

  cse_block #(.IW(IW)) u_cse_a0 (.d(a0), .d3(a0_3), .d5(a0_5), .d15(a0_15));
  cse_block #(.IW(IW)) u_cse_b0 (.d(b0), .d3(b0_3), .d5(b0_5), .d15(b0_15));

  pw_t ac1 [9], as1 [9], bc1 [9], bs1 [9];

  for (genvar k = 0; k < 9; k++) begin : g_coarse
    localparam int KC = fft_pkg::w256_coarse_cos(k);
    localparam int KS = fft_pkg::w256_coarse_sin(k);
    csd_const_mult #(.K(KC), .KW(KW), .IW(IW), .OW(PW)) u_ac (.d(a0), .d3(a0_3), .d5(a0_5), .d15(a0_15), .p(ac1[k]));
    csd_const_mult #(.K(KS), .KW(KW), .IW(IW), .OW(PW)) u_as (.d(a0), .d3(a0_3), .d5(a0_5), .d15(a0_15), .p(as1[k]));
    csd_const_mult #(.K(KC), .KW(KW), .IW(IW), .OW(PW)) u_bc (.d(b0), .d3(b0_3), .d5(b0_5), .d15(b0_15), .p(bc1[k]));
    csd_const_mult #(.K(KS), .KW(KW), .IW(IW), .OW(PW)) u_bs (.d(b0), .d3(b0_3), .d5(b0_5), .d15(b0_15), .p(bs1[k]));
  end

  iw_t a1, b1;

  // (a + jb)(C - jS) = (aC + bS) + j(bC - aS)
  always_comb begin
    int unsigned k1;
    k1 = (p1 > 4'd8) ? 8 : int'(p1);
    a1 = round_int(sw_t'(ac1[k1]) + sw_t'(bs1[k1]));
    b1 = round_int(sw_t'(bc1[k1]) - sw_t'(as1[k1]));
  end

  // ------------------------------------------------------ step 2b: W^p2
  cse_block #(.IW(IW)) u_cse_a1 (.d(a1), .d3(a1_3), .d5(a1_5), .d15(a1_15));
  cse_block #(.IW(IW)) u_cse_b1 (.d(b1), .d3(b1_3), .d5(b1_5), .d15(b1_15));

  pw_t ac2 [4], as2 [4], bc2 [4], bs2 [4];

  for (genvar k = 0; k < 4; k++) begin : g_fine
    localparam int KC = fft_pkg::w256_fine_cos(k);
    localparam int KS = fft_pkg::w256_fine_sin(k);
    csd_const_mult #(.K(KC), .KW(KW), .IW(IW), .OW(PW)) u_ac (.d(a1), .d3(a1_3), .d5(a1_5), .d15(a1_15), .p(ac2[k]));
    csd_const_mult #(.K(KS), .KW(KW), .IW(IW), .OW(PW)) u_as (.d(a1), .d3(a1_3), .d5(a1_5), .d15(a1_15), .p(as2[k]));
    csd_const_mult #(.K(KC), .KW(KW), .IW(IW), .OW(PW)) u_bc (.d(b1), .d3(b1_3), .d5(b1_5), .d15(b1_15), .p(bc2[k]));
    csd_const_mult #(.K(KS), .KW(KW), .IW(IW), .OW(PW)) u_bs (.d(b1), .d3(b1_3), .d5(b1_5), .d15(b1_15), .p(bs2[k]));
  end

  iw_t a2, b2;

  always_comb begin
    a2 = round_int(sw_t'(ac2[p2]) + sw_t'(bs2[p2]));
    b2 = round_int(sw_t'(bc2[p2]) - sw_t'(as2[p2]));
  end

  // ------------------------------------------ step 1 again: trivial factors
  function automatic logic signed [W-1:0] sat(iw_t x);
    if (x > iw_t'((1 <<< (W - 1)) - 1))  return {1'b0, {(W-1){1'b1}}};
    else if (x < -iw_t'(1 <<< (W - 1))) return {1'b1, {(W-1){1'b0}}};
    else                                  return x[W-1:0];
  endfunction

  iw_t        a3, b3;
  logic [1:0] rot;

  always_comb begin
    a3  = a2;
    b3  = mirror ? -b2 : b2;       // undo the conjugation
    rot = quad + {1'b0, mirror};   // multiply by (-j)^rot
    unique case (rot)
      2'd0: begin out_re = sat(a3);  out_im = sat(b3);  end
      2'd1: begin out_re = sat(b3);  out_im = sat(-a3); end
      2'd2: begin out_re = sat(-a3); out_im = sat(-b3); end
      2'd3: begin out_re = sat(-b3); out_im = sat(a3);  end
    endcase
  end

endmodule
