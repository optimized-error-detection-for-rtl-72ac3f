// residue_checker: signed-digit residue checker for Z = A * B + C.
//
// Four binary-to-residue converters reduce A, B (N bits), C (2N bits) and the
// product-sum result Z (2N bits plus its carry out) modulo m = 2^P + u. The
// residue product-sum circuit predicts z = |a*b + c| m from the operand
// residues, and the subtraction circuit forms E = |Z|m - z and raises err when
// E is not 0 modulo m. The checker works on P-digit residues with P much
// smaller than N, and because every step is a carry-free SD addition its delay
// depends on the number of tree stages, not on P.
//
// u_sel switches the modulus between 2^P - 1 and 2^P + 1 with the same
// hardware; errors that are a multiple of one modulus are usually caught by
// the other. u_sel = U_ZERO (m = 2^P) also works, but then only the low P
// bits of Z are checked. Purely combinational; the partition into converters, residue
// product-sum and subtraction follows the source design.
module residue_checker
  import sd_pkg::*;
#(
  parameter int N = 32,
  parameter int P = 8
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  logic [2*N-1:0]    c,
  input  logic [2*N:0]      z,
  input  u_sel_t            u_sel,
  output sd_digit_t [P-1:0] e,
  output logic              err
);

  sd_digit_t [P-1:0] ra, rb, rc, rz, zp;

  bin2res #(.W(N),     .P(P)) u_conv_a (.bin(a), .u_sel(u_sel), .res(ra));
  bin2res #(.W(N),     .P(P)) u_conv_b (.bin(b), .u_sel(u_sel), .res(rb));
  bin2res #(.W(2*N),   .P(P)) u_conv_c (.bin(c), .u_sel(u_sel), .res(rc));
  bin2res #(.W(2*N+1), .P(P)) u_conv_z (.bin(z), .u_sel(u_sel), .res(rz));

  res_product_sum #(.P(P)) u_rps (.a(ra), .b(rb), .c(rc), .u_sel(u_sel), .z(zp));

  res_error_detect #(.P(P)) u_det (.z_res(rz), .z_pred(zp), .u_sel(u_sel), .e(e), .err(err));

endmodule
