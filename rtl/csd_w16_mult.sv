// csd_w16_mult: multiplier-less constant complex multiplier by W16^e,
// W16 = exp(-j*2*pi/16), for the seven exponents e in {0,1,2,3,4,6,9} that
// a radix-2^4 pipeline needs after its 2nd and 6th butterfly stages.
//
// How it works. With c1 = cos(pi/8), c2 = cos(pi/4), c3 = cos(3*pi/8),
// every needed factor is built from 1, c1, c2 and c3 alone:
//   W^0 = 1          W^1 = c1 - j*c3     W^2 = c2 - j*c2    W^3 = c3 - j*c1
//   W^4 = -j         W^6 = -c2 - j*c2    W^9 = -c1 + j*c3
// Each real input component d (re and im separately) is multiplied by the
// three constants with shifts and adds on their 12-bit CSD forms, sharing
// the sub-expression s = d + d/4 (CSD pattern 1 0 1):
//   d*c1 = d - s/16 + d/512            (0.923828 = 1892/2048)
//   d*c2 = d - s/4 + s/64              (0.707031 = 1448/2048)
//   d*c3 = d/2 - d/8 + d/128           (0.382813 =  784/2048)
// The shifts are wiring; the sum is exact because d is first extended by
// 9 fraction bits. Two 4-to-1 selects per output component (sel1: which of
// d, d*c1, d*c2, d*c3 of the real and of the imaginary input) feed one
// adder/subtractor each (sel2: signs, or a zero operand for the trivial
// factors 1 and -j). The result is rounded to nearest and saturated to W
// bits (a rotation by 45 degrees can grow one component by up to sqrt(2)).
//
// Interface: purely combinational; 'e' selects the exponent. Exponents
// outside the set of seven give the product by 1.
//
// The constant set, the CSD forms, the shared sub-expression and the
// mux-based selection follow the design description; the guard bits,
// round-to-nearest and saturation are this implementation's choices.
module csd_w16_mult #(
  parameter int unsigned W = fft_pkg::DATA_W
) (
  input  logic [3:0]          e,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int unsigned G  = 9;        // guard (fraction) bits
  localparam int unsigned XW = W + G + 2; // extended width

  typedef logic signed [XW-1:0] xw_t;

  // Products of one real input by 1, c1, c2, c3 (index 0..3).
  xw_t pa [4];
  xw_t pb [4];

  function automatic void csd_products(input logic signed [W-1:0] d,
                                       output xw_t p [4]);
    xw_t dx, s;
    dx   = xw_t'(d) <<< G;
    s    = dx + (dx >>> 2);
    p[0] = dx;
    p[1] = dx - (s >>> 4) + (dx >>> 9);
    p[2] = dx - (s >>> 2) + (s >>> 6);
    p[3] = (dx >>> 1) - (dx >>> 3) + (dx >>> 7);
  endfunction

  always_comb begin
    csd_products(in_re, pa);
    csd_products(in_im, pb);
  end

  // sel1: coefficient index of each operand; sel2: sign / zero of each.
  typedef struct packed {
    logic [1:0] ia;   // real part: coefficient applied to in_re
    logic [1:0] ib;   // real part: coefficient applied to in_im
    logic       na;   //   negate / zero the in_re term
    logic       za;
    logic       nb;   //   negate / zero the in_im term
    logic       zb;
    logic [1:0] ja;   // imaginary part: coefficient applied to in_re
    logic [1:0] jb;   // imaginary part: coefficient applied to in_im
    logic       ma;
    logic       ya;
    logic       mb;
    logic       yb;
  } w16_sel_t;

  w16_sel_t sel;

  // (a + jb)(wr + j wi) = (a wr - b wi) + j (a wi + b wr)
  always_comb begin
    sel = '0;
    unique case (e)
      4'd1:    sel = '{ia:2'd1, ib:2'd3, na:1'b0, za:1'b0, nb:1'b0, zb:1'b0,
                       ja:2'd3, jb:2'd1, ma:1'b1, ya:1'b0, mb:1'b0, yb:1'b0};
      4'd2:    sel = '{ia:2'd2, ib:2'd2, na:1'b0, za:1'b0, nb:1'b0, zb:1'b0,
                       ja:2'd2, jb:2'd2, ma:1'b1, ya:1'b0, mb:1'b0, yb:1'b0};
      4'd3:    sel = '{ia:2'd3, ib:2'd1, na:1'b0, za:1'b0, nb:1'b0, zb:1'b0,
                       ja:2'd1, jb:2'd3, ma:1'b1, ya:1'b0, mb:1'b0, yb:1'b0};
      4'd4:    sel = '{ia:2'd0, ib:2'd0, na:1'b0, za:1'b1, nb:1'b0, zb:1'b0,
                       ja:2'd0, jb:2'd0, ma:1'b1, ya:1'b0, mb:1'b0, yb:1'b1};
      4'd6:    sel = '{ia:2'd2, ib:2'd2, na:1'b1, za:1'b0, nb:1'b0, zb:1'b0,
                       ja:2'd2, jb:2'd2, ma:1'b1, ya:1'b0, mb:1'b1, yb:1'b0};
      4'd9:    sel = '{ia:2'd1, ib:2'd3, na:1'b1, za:1'b0, nb:1'b1, zb:1'b0,
                       ja:2'd3, jb:2'd1, ma:1'b0, ya:1'b0, mb:1'b1, yb:1'b0};
      default: sel = '{ia:2'd0, ib:2'd0, na:1'b0, za:1'b0, nb:1'b0, zb:1'b1,
                       ja:2'd0, jb:2'd0, ma:1'b0, ya:1'b1, mb:1'b0, yb:1'b0};
    endcase
  end

  function automatic xw_t term(xw_t p, logic neg, logic zero);
    if (zero)     return '0;
    else if (neg) return -p;
    else          return p;
  endfunction

  function automatic logic signed [W-1:0] round_sat(xw_t x);
    xw_t r;
    r = (x + (xw_t'(1) <<< (G - 1))) >>> G;
    if (r > xw_t'((1 <<< (W - 1)) - 1))  return {1'b0, {(W-1){1'b1}}};
    else if (r < -xw_t'(1 <<< (W - 1))) return {1'b1, {(W-1){1'b0}}};
    else                                  return r[W-1:0];
  endfunction

  xw_t acc_re, acc_im;

  always_comb begin
    acc_re = term(pa[sel.ia], sel.na, sel.za) + term(pb[sel.ib], sel.nb, sel.zb);
    acc_im = term(pa[sel.ja], sel.ma, sel.ya) + term(pb[sel.jb], sel.mb, sel.yb);
    out_re = round_sat(acc_re);
    out_im = round_sat(acc_im);
  end

endmodule
