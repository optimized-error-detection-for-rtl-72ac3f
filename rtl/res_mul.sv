// res_mul: modulo m = 2^P + u multiplier of two P-digit signed-digit residues.
//
// prod = a * b (mod m) = sum_j b_j * (a * 2^j mod m). Multiplying by 2^j
// modulo m is a left rotation by j positions in which the digits that wrap
// around the top are multiplied by -u (because 2^P = -u mod m). Each rotated
// copy is multiplied digit by digit with b_j by 1-by-1 digit multipliers, and
// the P partial products are summed by a mod_sd_adder_tree. No carries
// propagate anywhere; the delay is ceil(log2 P) modulo-m adder stages.
// The source design names a residue multiplier without its structure; this
// construction from its SD adder and digit multiplier is this design's
// choice. Purely combinational.
module res_mul
  import sd_pkg::*;
#(
  parameter int P = 8
) (
  input  sd_digit_t [P-1:0] a,
  input  sd_digit_t [P-1:0] b,
  input  u_sel_t            u_sel,
  output sd_digit_t [P-1:0] prod
);

  sd_digit_t                neg_u;
  sd_digit_t [P-1:0][P-1:0] pp;     // pp[j] = b_j * a * 2^j (mod m)

  assign neg_u = sd_wrap_digit(u_sel);

  for (genvar j = 0; j < P; j++) begin : g_pp
    for (genvar i = 0; i < P; i++) begin : g_dig
      sd_digit_t rot;
      if (i >= j) begin : g_straight
        assign rot = a[i-j];
      end else begin : g_wrapped
        sd_digit_mul u_wrap (.a(a[i-j+P]), .b(neg_u), .p(rot));
      end
      sd_digit_mul u_pp (.a(rot), .b(b[j]), .p(pp[j][i]));
    end
  end

  mod_sd_adder_tree #(.P(P), .K(P)) u_tree (.in(pp), .u_sel(u_sel), .sum(prod));

endmodule
