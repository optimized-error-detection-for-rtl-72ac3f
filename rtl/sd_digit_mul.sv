// sd_digit_mul: 1-by-1 signed-digit multiplier.
//
// p = a * b for digits in {-1, 0, 1}. With the sign/magnitude digit code this
// is an AND of the magnitudes and an XOR of the signs. The residue checker
// uses it for the end-around terms (a digit times -u) and for the partial
// products of the residue multiplier. Purely combinational.
module sd_digit_mul
  import sd_pkg::*;
(
  input  sd_digit_t a,
  input  sd_digit_t b,
  output sd_digit_t p
);

  logic mag;

  always_comb begin
    mag = a[0] & b[0];
    p   = {mag & (a[1] ^ b[1]), mag};
  end

endmodule
