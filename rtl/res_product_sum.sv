// res_product_sum: residue product-sum circuit, z = |a * b + c| mod m.
//
// Takes the P-digit SD residues of A, B and C, multiplies the first two in a
// res_mul and adds the third with one mod_sd_adder, all modulo m = 2^P + u.
// This predicts the residue that the binary product-sum result must have.
// Purely combinational: ceil(log2 P) + 1 modulo-m adder stages.
module res_product_sum
  import sd_pkg::*;
#(
  parameter int P = 8
) (
  input  sd_digit_t [P-1:0] a,
  input  sd_digit_t [P-1:0] b,
  input  sd_digit_t [P-1:0] c,
  input  u_sel_t            u_sel,
  output sd_digit_t [P-1:0] z
);

  sd_digit_t [P-1:0] ab;

  res_mul      #(.P(P)) u_mul (.a(a), .b(b), .u_sel(u_sel), .prod(ab));
  mod_sd_adder #(.P(P)) u_add (.x(ab), .y(c), .u_sel(u_sel), .z(z));

endmodule
