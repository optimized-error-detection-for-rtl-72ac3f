// sd_add2: second-stage cell ("add 2") of carry-free signed-digit addition.
//
// Adds the interim sum s_i of a position and the transfer digit c_{i-1}
// coming from the position below: z_i = s_i + c_{i-1}. The first stage
// (sd_add1) guarantees that the two never have the same non-zero sign, so the
// result is a single SD digit: the non-zero one of the two, or 0. (Two equal
// non-zero inputs cannot occur and would also give 0.) Purely combinational.
module sd_add2
  import sd_pkg::*;
(
  input  sd_digit_t s_i,
  input  sd_digit_t c_im1,
  output sd_digit_t z_i
);

  logic nz;

  always_comb begin
    nz  = s_i[0] ^ c_im1[0];
    z_i = {nz & (s_i[0] ? s_i[1] : c_im1[1]), nz};
  end

endmodule
