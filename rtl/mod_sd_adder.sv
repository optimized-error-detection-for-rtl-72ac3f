// mod_sd_adder: modulo m = 2^P + u adder for P-digit signed-digit numbers.
//
// z = x + y (mod m), with u in {-1, +1} chosen at run time by u_sel (u = 0,
// m = 2^P, is also accepted: the end-around terms are then zero).
// Each digit position has one sd_add1 (transfer c_i and interim sum s_i) and
// one sd_add2 (z_i = s_i + c_{i-1}). Because 2^P = -u (mod m), a transfer out
// of the top position re-enters position 0 multiplied by -u (end-around
// carry), and position 0 looks at the top digits of x and y, also multiplied
// by -u, as its "lower" digits. Every result digit depends only on digits
// i, i-1 and i-2 (cyclically), so the delay does not grow with P.
//
// The result is a redundant residue: some P-digit SD value in
// -(2^P-1) .. 2^P-1 congruent to x + y modulo m, not the canonical 0..m-1.
// The end-around factor -u follows from m = 2^P + u; it is the sign that makes
// the sum correct modulo m. Purely combinational.
module mod_sd_adder
  import sd_pkg::*;
#(
  parameter int P = 8
) (
  input  sd_digit_t [P-1:0] x,
  input  sd_digit_t [P-1:0] y,
  input  u_sel_t            u_sel,
  output sd_digit_t [P-1:0] z
);

  sd_digit_t            neg_u;   // -u as an SD digit
  sd_digit_t [P-1:0]    c, s;
  sd_digit_t            x_wrap, y_wrap, c_wrap;

  assign neg_u = sd_wrap_digit(u_sel);

  sd_digit_mul u_xw (.a(x[P-1]), .b(neg_u), .p(x_wrap));
  sd_digit_mul u_yw (.a(y[P-1]), .b(neg_u), .p(y_wrap));
  sd_digit_mul u_cw (.a(c[P-1]), .b(neg_u), .p(c_wrap));

  for (genvar i = 0; i < P; i++) begin : g_digit
    sd_digit_t x_lo, y_lo, c_lo;
    if (i == 0) begin : g_wrap
      assign x_lo = x_wrap;
      assign y_lo = y_wrap;
      assign c_lo = c_wrap;
    end else begin : g_inner
      assign x_lo = x[i-1];
      assign y_lo = y[i-1];
      assign c_lo = c[i-1];
    end
    sd_add1 u_add1 (.x_i(x[i]), .y_i(y[i]), .x_im1(x_lo), .y_im1(y_lo),
                    .c_i(c[i]), .s_i(s[i]));
    sd_add2 u_add2 (.s_i(s[i]), .c_im1(c_lo), .z_i(z[i]));
  end

endmodule
