// fft_pkg: constants, types and helper functions shared by the 256-point
// radix-2^4 single-path delay feedback (SDF) FFT.
//
// The transform size (256), the radix-2^4 stage plan and the 12-bit word
// length follow the design description. The twiddle constants are the real
// and imaginary parts of W_N^k = exp(-j*2*pi*k/N) quantised to 11 fraction
// bits, K = round(2048 * cos(2*pi*k/N)) and round(2048 * sin(2*pi*k/N)); the
// canonical signed digit (CSD) form of each constant is derived from the
// integer at elaboration time by csd_digit(). Everything else here
// (rounding, the integer encodings) is this implementation's own choice.
package fft_pkg;

  localparam int unsigned FFT_N     = 256;  // transform size
  localparam int unsigned FFT_LOG2N = 8;    // pipeline stages / position bits
  localparam int unsigned DATA_W    = 12;   // data word length (per component)
  localparam int unsigned COEF_F    = 11;   // fraction bits of a twiddle constant

  // Butterfly flavour: BF1 is a plain radix-2 butterfly, BF2 additionally
  // applies the trivial -j rotation to the second operand when selected.
  typedef enum logic {
    BF1 = 1'b0,
    BF2 = 1'b1
  } bf_type_e;

  // Which non-trivial twiddle multiplier a twiddle stage holds.
  typedef enum logic {
    TW_W16  = 1'b0,
    TW_W256 = 1'b1
  } tw_kind_e;

  // Canonical signed digit i (weight 2^i) of the integer k: -1, 0 or +1.
  // Non-adjacent form: every odd remainder is rounded to the nearest
  // multiple of 4, which leaves no two adjacent non-zero digits.
  function automatic int csd_digit(int k, int i);
    int v;
    int d;
    v = k;
    d = 0;
    for (int b = 0; b <= i; b++) begin
      if ((v % 2) != 0) d = 2 - (((v % 4) + 4) % 4);
      else              d = 0;
      v = (v - d) / 2;
    end
    return d;
  endfunction

  // Common sub-expression (CSE) cover of the CSD form of k. The digits are
  // scanned from the most significant one down; a non-zero digit at
  // position i starts
  //   pattern  1 0 1      (digits i, i-2 equal)            -> term  5*d << (i-2)
  //   pattern  1 0 -1     (digit i-2 opposite)             -> term  3*d << (i-2)
  //   pattern  1 0 0 0 -1 (digits i-1..i-3 zero, i-4 opp.) -> term 15*d << (i-4)
  // tried in that order, or else a single term d << i. The result for base
  // position j is the signed kind of the term whose lowest digit is j:
  // +-1 (d), +-3, +-5, +-15, or 0 when no term is based at j.
  localparam int CSE_MAXD = 16;

  function automatic int cse_term(int k, int j);
    int dg [CSE_MAXD];
    int kind [CSE_MAXD];
    int i;
    for (int b = 0; b < CSE_MAXD; b++) begin
      dg[b]   = csd_digit(k, b);
      kind[b] = 0;
    end
    i = CSE_MAXD - 1;
    while (i >= 0) begin
      if (dg[i] == 0) begin
        i = i - 1;
      end else if (i >= 2 && dg[i-1] == 0 && dg[i-2] == dg[i]) begin
        kind[i-2] = 5 * dg[i];
        i = i - 3;
      end else if (i >= 2 && dg[i-1] == 0 && dg[i-2] == -dg[i]) begin
        kind[i-2] = 3 * dg[i];
        i = i - 3;
      end else if (i >= 4 && dg[i-1] == 0 && dg[i-2] == 0 && dg[i-3] == 0
                   && dg[i-4] == -dg[i]) begin
        kind[i-4] = 15 * dg[i];
        i = i - 5;
      end else begin
        kind[i] = dg[i];
        i = i - 1;
      end
    end
    return kind[j];
  endfunction

  // round(2048*cos(2*pi*4*p1/256)) and round(2048*sin(...)), p1 = 0..8:
  // the coarse factors W256^(4*p1) of the cascade multiplier.
  function automatic int w256_coarse_cos(int p1);
    case (p1)
      0: return 2048;  1: return 2038;  2: return 2009;
      3: return 1960;  4: return 1892;  5: return 1806;
      6: return 1703;  7: return 1583;  default: return 1448;
    endcase
  endfunction

  function automatic int w256_coarse_sin(int p1);
    case (p1)
      0: return 0;     1: return 201;   2: return 400;
      3: return 595;   4: return 784;   5: return 965;
      6: return 1138;  7: return 1299;  default: return 1448;
    endcase
  endfunction

  // round(2048*cos(2*pi*p2/256)) and round(2048*sin(...)), p2 = 0..3:
  // the fine factors W256^p2 of the cascade multiplier.
  function automatic int w256_fine_cos(int p2);
    case (p2)
      0: return 2048;  1: return 2047;  2: return 2046;  default: return 2042;
    endcase
  endfunction

  function automatic int w256_fine_sin(int p2);
    case (p2)
      0: return 0;     1: return 50;    2: return 100;   default: return 151;
    endcase
  endfunction

  // Exponent of the W16 twiddle that follows a radix-2^2 pair of
  // butterflies. nib is the 4-bit field of the sample position that the
  // pair has just processed: nib[3:2] are the two frequency bits produced
  // (in bit-reversed order), nib[1:0] the two remaining time bits.
  // Result = nib[1:0] * {nib[2], nib[3]}, one of 0,1,2,3,4,6,9.
  function automatic logic [3:0] w16_exponent(logic [3:0] nib);
    return 4'(nib[1:0] * {nib[2], nib[3]});
  endfunction

  // Exponent of the W256 twiddle after stage 4: the position is
  // {k1,k2,k3,k4, m[3:0]}; the exponent is m * (k1 + 2k2 + 4k3 + 8k4).
  function automatic logic [7:0] w256_exponent(logic [7:0] pos);
    return 8'(pos[3:0] * {pos[4], pos[5], pos[6], pos[7]});
  endfunction

  function automatic logic [7:0] bitrev8(logic [7:0] x);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = x[7-i];
    return r;
  endfunction

endpackage
