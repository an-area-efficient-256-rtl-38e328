// cse_block: the common sub-expressions shared by all CSD constant
// multipliers that multiply the same input.
//
// From the input d it forms 3*d = 4d - d (CSD pattern 1 0 -1),
// 5*d = 4d + d (pattern 1 0 1) and 15*d = 16d - d (pattern 1 0 0 0 -1),
// one adder each; the shifts are wiring. The constant multipliers
// (csd_const_mult) then shift these into place instead of adding the
// individual digits again. Purely combinational.
//
// The three patterns are the shared terms the design description uses for
// its W256 twiddle constants; forming them in one block per input is this
// implementation's arrangement.
module cse_block #(
  parameter int unsigned IW = fft_pkg::DATA_W + 2
) (
  input  logic signed [IW-1:0] d,
  output logic signed [IW+1:0] d3,
  output logic signed [IW+2:0] d5,
  output logic signed [IW+3:0] d15
);

  assign d3  = ((IW+2)'(d) <<< 2) - (IW+2)'(d);
  assign d5  = ((IW+3)'(d) <<< 2) + (IW+3)'(d);
  assign d15 = ((IW+4)'(d) <<< 4) - (IW+4)'(d);

endmodule
