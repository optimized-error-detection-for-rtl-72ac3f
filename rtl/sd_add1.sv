// sd_add1: first-stage cell ("add 1") of carry-free signed-digit addition.
//
// For digit position i it splits x_i + y_i into a transfer digit c_i and an
// interim sum s_i with x_i + y_i = 2*c_i + s_i. The choice between the two
// possible splits of +-1 looks at the next lower digits x_{i-1}, y_{i-1}:
// if both are >= 0 the lower position can only send a transfer of 0 or +1,
// so s_i is steered towards -1; otherwise it is steered towards +1. This
// keeps z_i = s_i + c_{i-1} inside {-1, 0, 1}, so no carry ripples.
//
//   x+y = +2 : c=+1, s= 0          x+y = -2 : c=-1, s= 0
//   x+y =  0 : c= 0, s= 0
//   x+y = +1 : lower both >= 0 ? (c=+1, s=-1) : (c= 0, s=+1)
//   x+y = -1 : lower both >= 0 ? (c= 0, s=-1) : (c=-1, s=+1)
//
// The two-cell split, the inputs of the cell and the digit code follow the
// source design; the rule table above is the usual one for this structure and
// is this design's choice. Purely combinational, a handful of gates.
module sd_add1
  import sd_pkg::*;
(
  input  sd_digit_t x_i,
  input  sd_digit_t y_i,
  input  sd_digit_t x_im1,
  input  sd_digit_t y_im1,
  output sd_digit_t c_i,
  output sd_digit_t s_i
);

  logic low_nonneg;            // both lower digits are 0 or +1
  logic one;                   // |x_i + y_i| = 1
  logic two_pos, two_neg;      // x_i + y_i = +2 / -2
  logic one_pos, one_neg;      // x_i + y_i = +1 / -1

  always_comb begin
    low_nonneg = ~sd_is_neg(x_im1) & ~sd_is_neg(y_im1);
    one        = x_i[0] ^ y_i[0];
    two_pos    = sd_is_pos(x_i) & sd_is_pos(y_i);
    two_neg    = sd_is_neg(x_i) & sd_is_neg(y_i);
    one_pos    = one & (sd_is_pos(x_i) | sd_is_pos(y_i));
    one_neg    = one & (sd_is_neg(x_i) | sd_is_neg(y_i));
    // transfer: +1 for +2, or +1 leaning up; -1 for -2, or -1 leaning down
    c_i = {two_neg | (one_neg & ~low_nonneg),
           two_pos | two_neg | (one_pos & low_nonneg) | (one_neg & ~low_nonneg)};
    // interim sum is non-zero only for |x_i + y_i| = 1, and then it is -1
    // when the lower digits are non-negative and +1 otherwise
    s_i = {one & low_nonneg, one};
  end

endmodule
