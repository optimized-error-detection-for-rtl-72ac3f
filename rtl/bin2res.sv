// bin2res: binary-to-residue converter, unsigned W-bit binary to a P-digit
// signed-digit residue modulo m = 2^P + u.
//
// The word is cut into K = ceil(W/P) chunks of P bits (the top one padded
// with zeros). Since 2^P = -u (mod m), chunk k has weight (-u)^k: for u = -1
// every chunk counts +1, for u = +1 the odd chunks count -1 and are negated
// digit by digit, and for u = 0 (m = 2^P) only chunk 0 counts. Each chunk's bits are already SD digits in {0, 1}, so the
// chunks go straight into a mod_sd_adder_tree; only SD additions are used and
// no carry ever crosses a chunk. The chunk-and-tree structure is this
// design's choice; the source design names the converter and states that it
// is built from SD additions. Purely combinational, ceil(log2 K) adder stages.
module bin2res
  import sd_pkg::*;
#(
  parameter int W = 32,
  parameter int P = 8
) (
  input  logic [W-1:0]      bin,
  input  u_sel_t            u_sel,
  output sd_digit_t [P-1:0] res
);

  localparam int K = (W + P - 1) / P;

  logic [K*P-1:0]           padded;
  sd_digit_t                wrap;      // -u
  sd_digit_t [K-1:0]        weight;    // (-u)^k
  sd_digit_t [K-1:0][P-1:0] chunk;

  assign padded = {{(K*P-W){1'b0}}, bin};
  assign wrap   = sd_wrap_digit(u_sel);

  always_comb begin
    for (int k = 0; k < K; k++) begin
      if (k == 0)                     weight[k] = SD_POS;
      else if (sd_is_neg(wrap))       weight[k] = (k % 2 == 1) ? SD_NEG : SD_POS;
      else                            weight[k] = wrap;
      // bit 1 becomes the chunk's weight digit, bit 0 stays 0
      for (int i = 0; i < P; i++) chunk[k][i] = padded[k*P+i] ? weight[k] : SD_ZERO;
    end
  end

  mod_sd_adder_tree #(.P(P), .K(K)) u_tree (.in(chunk), .u_sel(u_sel), .sum(res));

endmodule
