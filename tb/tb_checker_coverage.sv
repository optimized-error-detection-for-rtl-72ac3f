// tb_checker_coverage: two-bit error coverage of the checked product-sum unit
// at both evaluated residue word lengths, P = 4 (m = 15 / 17) and P = 8
// (m = 255 / 257), with N = 32.
//
// For a few random operand sets, every pair of result bits (65*64/2 = 2080
// pairs) is flipped and the flag is checked against the reference (the change
// is caught exactly when it is not 0 modulo m) under u = -1 and u = +1. It
// prints, per word length, how many two-bit errors each modulus catches and
// how many are caught by at least one of them, i.e. when the check is repeated
// with u switched. Single-bit errors must always be caught.
module tb_checker_coverage;
  import sd_pkg::*;

  localparam int N = 32;
  localparam int SETS = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [N-1:0]     a, b;
  logic [2*N-1:0]   c, z4, z8;
  logic             zc4, zc8;
  logic [2*N:0]     fault_mask;
  u_sel_t           u_sel;
  sd_digit_t [3:0]  e4;
  sd_digit_t [7:0]  e8;
  logic             err4, err8;

  checked_mac #(.N(N), .P(4)) dut4 (.a(a), .b(b), .c(c), .u_sel(u_sel), .fault_mask(fault_mask),
                                    .z(z4), .z_carry(zc4), .e(e4), .err(err4));
  checked_mac #(.N(N), .P(8)) dut8 (.a(a), .b(b), .c(c), .u_sel(u_sel), .fault_mask(fault_mask),
                                    .z(z8), .z_carry(zc8), .e(e8), .err(err8));

  // [word length index][0: u=-1, 1: u=+1, 2: either]
  int caught[2][3];
  int total_pairs = 0;

  function automatic int horner(logic [2*N:0] w, int m);
    int r = 0;
    for (int i = 2 * N; i >= 0; i--) r = (2 * r + int'(w[i])) % m;
    return r;
  endfunction

  function automatic logic [2*N:0] ref_mac(logic [N-1:0] x, logic [N-1:0] y, logic [2*N-1:0] w);
    logic [2*N:0] acc = {1'b0, w};
    for (int i = 0; i < N; i++) if (y[i]) acc += ((2*N+1)'(x) << i);
    return acc;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s mask=%h u=%0d", what, fault_mask, u_sel);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (caught[w, k]) caught[w][k] = 0;
    for (int s = 0; s < SETS; s++) begin
      logic [2*N:0] good;
      a = $urandom; b = $urandom; c = {$urandom, $urandom};
      good = ref_mac(a, b, c);
      for (int i = 0; i <= 2 * N; i++) begin
        for (int j = i; j <= 2 * N; j++) begin
          bit f4[2], f8[2];
          fault_mask = '0;
          fault_mask[i] = 1'b1;
          fault_mask[j] = 1'b1;
          for (int u = 0; u < 2; u++) begin
            u_sel = u_sel_t'(u);
            @(posedge clk);
            check(err4 == (horner(good ^ fault_mask, 16 + (u ? 1 : -1)) != horner(good, 16 + (u ? 1 : -1))), "P=4 flag");
            check(err8 == (horner(good ^ fault_mask, 256 + (u ? 1 : -1)) != horner(good, 256 + (u ? 1 : -1))), "P=8 flag");
            f4[u] = err4;
            f8[u] = err8;
            if (i == j) check(err4 && err8, "single-bit error missed");
          end
          if (i != j) begin
            total_pairs++;
            for (int u = 0; u < 2; u++) begin
              caught[0][u] += int'(f4[u]);
              caught[1][u] += int'(f8[u]);
            end
            caught[0][2] += int'(f4[0] | f4[1]);
            caught[1][2] += int'(f8[0] | f8[1]);
          end
        end
      end
    end
    for (int w = 0; w < 2; w++) begin
      $display("P=%0d: two-bit errors %0d, caught with u=-1 %0d, with u=+1 %0d, by either %0d",
               (w == 0) ? 4 : 8, total_pairs, caught[w][0], caught[w][1], caught[w][2]);
      // switching u must catch strictly more than either modulus alone
      check(caught[w][2] > caught[w][0] && caught[w][2] > caught[w][1], "switching u gained nothing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
