// checked_mac: product-sum circuit with a signed-digit residue checker (top).
//
// Computes {z_carry, z} = A * B + C (N-bit A, B; 2N-bit C, Z) and checks it
// with residue_checker modulo m = 2^P + u, u chosen at run time by u_sel.
// err = 1 means the residue of the result disagrees with the residue predicted
// from the operands: an error in the product-sum circuit or in the checker.
//
// fault_mask is this design's own addition for testing: its bits are XORed
// onto the (2N+1)-bit result right after the product-sum circuit, modelling a
// computation fault; both the outputs and the checker see the faulty value.
// Tie it to zero in normal use. Purely combinational: all outputs follow the
// inputs within one combinational delay.
module checked_mac
  import sd_pkg::*;
#(
  parameter int N = 32,
  parameter int P = 8
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  logic [2*N-1:0]    c,
  input  u_sel_t            u_sel,
  input  logic [2*N:0]      fault_mask,
  output logic [2*N-1:0]    z,
  output logic              z_carry,
  output sd_digit_t [P-1:0] e,
  output logic              err
);

  logic [2*N-1:0] z_raw;
  logic           carry_raw;
  logic [2*N:0]   z_full;

  product_sum #(.N(N)) u_mac (.a(a), .b(b), .c(c), .z(z_raw), .z_carry(carry_raw));

  assign z_full       = {carry_raw, z_raw} ^ fault_mask;
  assign {z_carry, z} = z_full;

  residue_checker #(.N(N), .P(P)) u_chk (
    .a(a), .b(b), .c(c), .z(z_full), .u_sel(u_sel), .e(e), .err(err)
  );

endmodule
