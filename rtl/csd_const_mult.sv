// csd_const_mult: multiplies a signed input by a fixed integer constant K
// with shifts and adds only, using shared common sub-expressions.
//
// The constant is taken in canonical signed digit (CSD) form, digits in
// {-1, 0, +1} with no two adjacent non-zero digits (fft_pkg::csd_digit).
// Its digits are then covered, at elaboration (fft_pkg::cse_term), by the
// CSE patterns 1 0 1 (5*d), 1 0 -1 (3*d) and 1 0 0 0 -1 (15*d) where they
// occur, and by single digits (d) elsewhere. The caller computes 3*d, 5*d
// and 15*d once per input (cse_block) and shares them among all constants
// multiplying that input; this module only shifts them into place and adds
// or subtracts them. The product d*K is exact; the caller scales it.
// Purely combinational.
//
// Used for the twiddle constants of the cascade W256 multiplier. The three
// CSE patterns are the ones the design description names for its 12-bit
// twiddle constants; the order in which they are tried is this
// implementation's own choice.
module csd_const_mult #(
  parameter int          K  = 1448,  // constant, |K| < 2^(KW-1)
  parameter int unsigned KW = 13,    // width of the constant incl. sign
  parameter int unsigned IW = fft_pkg::DATA_W + 2,
  parameter int unsigned OW = IW + KW
) (
  input  logic signed [IW-1:0]   d,
  input  logic signed [IW+1:0]   d3,   // 3*d
  input  logic signed [IW+2:0]   d5,   // 5*d
  input  logic signed [IW+3:0]   d15,  // 15*d
  output logic signed [OW-1:0]   p
);

  localparam int unsigned ND = KW + 1;  // CSD may need one more digit

  logic signed [OW-1:0] term [ND];

  for (genvar j = 0; j < ND; j++) begin : g_term
    localparam int KIND = fft_pkg::cse_term(K, j);
    if (KIND == 1) begin : g_p1
      assign term[j] = OW'(d) <<< j;
    end else if (KIND == -1) begin : g_n1
      assign term[j] = -(OW'(d) <<< j);
    end else if (KIND == 3) begin : g_p3
      assign term[j] = OW'(d3) <<< j;
    end else if (KIND == -3) begin : g_n3
      assign term[j] = -(OW'(d3) <<< j);
    end else if (KIND == 5) begin : g_p5
      assign term[j] = OW'(d5) <<< j;
    end else if (KIND == -5) begin : g_n5
      assign term[j] = -(OW'(d5) <<< j);
    end else if (KIND == 15) begin : g_p15
      assign term[j] = OW'(d15) <<< j;
    end else if (KIND == -15) begin : g_n15
      assign term[j] = -(OW'(d15) <<< j);
    end else begin : g_zero
      assign term[j] = '0;
    end
  end

  always_comb begin
    p = '0;
    for (int j = 0; j < ND; j++) p = p + term[j];
  end

endmodule
