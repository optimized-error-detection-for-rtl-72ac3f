// mod_sd_adder_tree: sums K signed-digit residues modulo m = 2^P + u.
//
// A balanced binary tree of mod_sd_adder cells, stored heap-style: leaves
// occupy nodes L .. 2L-1 (L = K rounded up to a power of two, unused leaves
// are zero) and node j = node 2j + node 2j+1. The result is node 1. The
// delay is ceil(log2 K) adder stages, each independent of P, which is where
// the checker gets its speed. With K = 1 the input is passed through.
// Purely combinational.
module mod_sd_adder_tree
  import sd_pkg::*;
#(
  parameter int P = 8,
  parameter int K = 8
) (
  input  sd_digit_t [K-1:0][P-1:0] in,
  input  u_sel_t                   u_sel,
  output sd_digit_t [P-1:0]        sum
);

  localparam int LEVELS = (K > 1) ? $clog2(K) : 0;
  localparam int L      = 1 << LEVELS;

  sd_digit_t [2*L-1:1][P-1:0] node;

  for (genvar j = 0; j < L; j++) begin : g_leaf
    if (j < K) begin : g_in
      assign node[L+j] = in[j];
    end else begin : g_pad
      assign node[L+j] = '0;
    end
  end

  for (genvar j = 1; j < L; j++) begin : g_add
    mod_sd_adder #(.P(P)) u_add (
      .x(node[2*j]), .y(node[2*j+1]), .u_sel(u_sel), .z(node[j])
    );
  end

  assign sum = node[1];

endmodule
