// res_error_detect: subtraction circuit and error flag of the residue checker.
//
// E = z' - z (mod m) where z' is the residue of the binary result and z the
// residue predicted from the operands. The subtraction is one mod_sd_adder
// with z negated digit by digit (negation of an SD number is free).
// E is a redundant residue in -(2^P-1) .. 2^P-1, so "E = 0 mod m" means:
// all digits 0, or, only when u = -1 (m = 2^P - 1), all digits +1 or all
// digits -1 (the values +-m). For m = 2^P + 1 and m = 2^P only all-zero is 0. err is 1 otherwise. The zero test is this
// design's own; the source design flags an error whenever E is not 0.
// Purely combinational.
module res_error_detect
  import sd_pkg::*;
#(
  parameter int P = 8
) (
  input  sd_digit_t [P-1:0] z_res,
  input  sd_digit_t [P-1:0] z_pred,
  input  u_sel_t            u_sel,
  output sd_digit_t [P-1:0] e,
  output logic              err
);

  sd_digit_t [P-1:0] z_neg;
  logic all_zero, all_pos, all_neg;

  always_comb begin
    for (int i = 0; i < P; i++) z_neg[i] = sd_negate(z_pred[i]);
  end

  mod_sd_adder #(.P(P)) u_sub (.x(z_res), .y(z_neg), .u_sel(u_sel), .z(e));

  always_comb begin
    all_zero = 1'b1;
    all_pos  = 1'b1;
    all_neg  = 1'b1;
    for (int i = 0; i < P; i++) begin
      all_zero &= ~e[i][0];
      all_pos  &= sd_is_pos(e[i]);
      all_neg  &= sd_is_neg(e[i]);
    end
    err = ~(all_zero | ((u_sel == U_MINUS) & (all_pos | all_neg)));
  end

endmodule
