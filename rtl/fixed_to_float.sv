// fixed_to_float: signed W-bit integer to IEEE-754 single precision.
//
// Used twice in the preprocessing unit: as converter 1 (W = 18) on the centered
// samples entering the whitening multiply, and as converter 2 (W = 24) on the
// covariance elements entering the EVD processor. The integer is sign-extended,
// its leading one located, and the next 23 bits kept as the fraction
// (truncation; exact for |value| < 2^24, so exact for both uses). Purely
// combinational. The two widths and the single-precision target follow the
// document; truncation and the absence of a pipeline register are this
// design's choices.
module fixed_to_float
  import fastica_pkg::*;
#(
  parameter int unsigned W = 18
) (
  input  logic signed [W-1:0] fixed_in,
  output fp32_t               float_out
);
  assign float_out = fp_from_int(32'(fixed_in));
endmodule
