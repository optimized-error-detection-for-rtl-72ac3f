// tb_mod_sd_adder_tree: self-checking test of the modulo 2^P+u SD adder tree.
//
// Random digit vectors into three trees (K = 8 and P = 8 by default, K = 5
// with P = 4, and K = 1 with P = 8), all three u (-1, +1, 0). value(sum) must equal the sum of
// the input values modulo m = 2^P + u.
module tb_mod_sd_adder_tree;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  u_sel_t                 u_sel;
  sd_digit_t [7:0][7:0]   in8;
  sd_digit_t [7:0]        sum8;
  sd_digit_t [4:0][3:0]   in5;
  sd_digit_t [3:0]        sum5;
  sd_digit_t [0:0][7:0]   in1;
  sd_digit_t [7:0]        sum1;

  mod_sd_adder_tree                 dut8 (.in(in8), .u_sel(u_sel), .sum(sum8));
  mod_sd_adder_tree #(.P(4), .K(5)) dut5 (.in(in5), .u_sel(u_sel), .sum(sum5));
  mod_sd_adder_tree #(.P(8), .K(1)) dut1 (.in(in1), .u_sel(u_sel), .sum(sum1));

  function automatic sd_digit_t enc(int v);
    return (v == 1) ? 2'b01 : (v == -1) ? 2'b11 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return (d == 2'b01) ? 1 : (d == 2'b11) ? -1 : 0;
  endfunction

  function automatic int val(sd_digit_t [7:0] v, int p);
    int r = 0;
    for (int i = p - 1; i >= 0; i--) r = 2 * r + dec(v[i]);
    return r;
  endfunction

  function automatic int md(int v, int m);
    return ((v % m) + m) % m;
  endfunction

  task automatic check(int p, int expect_sum, sd_digit_t [7:0] got);
    int m = (1 << p) + ((u_sel == U_PLUS) ? 1 : (u_sel == U_MINUS) ? -1 : 0);
    checks++;
    if (md(val(got, p), m) != md(expect_sum, m)) begin
      failures++;
      if (failures < 10) $display("FAIL P=%0d m=%0d want=%0d got=%0d", p, m, md(expect_sum, m), val(got, p));
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8000; t++) begin
      int s8, s5;
      s8 = 0;
      s5 = 0;
      u_sel = u_sel_t'(t % 3);
      for (int k = 0; k < 8; k++)
        for (int i = 0; i < 8; i++) in8[k][i] = enc(int'($urandom_range(2)) - 1);
      for (int k = 0; k < 5; k++)
        for (int i = 0; i < 4; i++) in5[k][i] = enc(int'($urandom_range(2)) - 1);
      in1[0] = in8[3];
      for (int k = 0; k < 8; k++) s8 += val(in8[k], 8);
      for (int k = 0; k < 5; k++) s5 += val({8'b0, in5[k]}, 4);
      @(posedge clk);
      check(8, s8, sum8);
      check(4, s5, {8'b0, sum5});
      check(8, val(in8[3], 8), sum1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
