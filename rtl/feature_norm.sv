// feature_norm: maps one signed DWT coefficient to the MLP's input range.
//
// The network expects inputs in -1..1, held as Q1.7 bytes (-128..127 stand for
// -1.0..0.992). The coefficient is shifted right arithmetically by SHIFT bits
// and saturated to that byte. With the orthonormal filters a constant 8-bit
// window gives a level-3 LL coefficient of 8 x pixel (at most 2040), so the
// default SHIFT = 4 maps full scale to 127. Purely combinational.
// Normalising to -1..1 follows the source design; the shift-and-saturate method
// and the shift amount are this design's choices.
module feature_norm
  import fd_pkg::*;
#(
  parameter int unsigned SHIFT = 4
) (
  input  coef_t coef,
  output feat_t feat
);
  coef_t shifted;
  always_comb begin
    shifted = coef >>> SHIFT;
    if (shifted > coef_t'(127))       feat = feat_t'(127);
    else if (shifted < -coef_t'(128)) feat = feat_t'(-128);
    else                              feat = feat_t'(shifted);
  end
endmodule
