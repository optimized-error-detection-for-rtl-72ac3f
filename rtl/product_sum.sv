// product_sum: the binary product-sum (multiply-add) circuit being checked.
//
// {z_carry, z} = A * B + C with N-bit unsigned A and B and 2N-bit C. The
// result is 2N bits as in the source design, plus the carry out, which the
// residue checker also sees so that a legitimate overflow of A * B + C is not
// reported as an error (keeping the carry is this design's choice). The
// multiplier's internal structure is not the subject here; the expression is
// left to synthesis. Purely combinational.
module product_sum #(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [2*N-1:0] c,
  output logic [2*N-1:0] z,
  output logic           z_carry
);

  logic [2*N:0] full;

  always_comb begin
    full = (2*N+1)'(a) * (2*N+1)'(b) + (2*N+1)'(c);
    {z_carry, z} = full;
  end

endmodule
