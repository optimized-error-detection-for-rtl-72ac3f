// tb_mod_sd_adder: self-checking test of the modulo 2^P+u SD adder.
//
// A P=4 instance is checked exhaustively (all 81 x 81 digit vectors, all
// three u: -1, +1, 0), the default P=8 instance with random digit vectors. For every result
// the digit codes must be valid and value(z) must equal value(x) + value(y)
// modulo m = 2^P + u, computed here with plain integer arithmetic.
module tb_mod_sd_adder;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  u_sel_t            u_sel;
  sd_digit_t [3:0]   x4, y4, z4;
  sd_digit_t [7:0]   x8, y8, z8;

  mod_sd_adder #(.P(4)) dut4 (.x(x4), .y(y4), .u_sel(u_sel), .z(z4));
  mod_sd_adder          dut8 (.x(x8), .y(y8), .u_sel(u_sel), .z(z8));

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

  function automatic bit valid(sd_digit_t [7:0] v, int p);
    for (int i = 0; i < p; i++) if (v[i] == 2'b10) return 0;
    return 1;
  endfunction

  function automatic int md(int v, int m);
    return ((v % m) + m) % m;
  endfunction

  function automatic sd_digit_t [7:0] rnd_vec();
    sd_digit_t [7:0] v;
    for (int i = 0; i < 8; i++) v[i] = enc(int'($urandom_range(2)) - 1);
    return v;
  endfunction

  task automatic check(int p, sd_digit_t [7:0] x, sd_digit_t [7:0] y, sd_digit_t [7:0] z);
    int m = (1 << p) + ((u_sel == U_PLUS) ? 1 : (u_sel == U_MINUS) ? -1 : 0);
    checks++;
    if (!valid(z, p) || md(val(z, p), m) != md(val(x, p) + val(y, p), m)) begin
      failures++;
      if (failures < 10)
        $display("FAIL P=%0d m=%0d x=%0d y=%0d z=%0d", p, m, val(x, p), val(y, p), val(z, p));
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sd_digit_t [7:0] xa, ya;
    for (int u = 0; u < 3; u++) begin
      u_sel = u_sel_t'(u);
      // exhaustive at P = 4
      for (int i = 0; i < 81; i++)
        for (int j = 0; j < 81; j++) begin
          int ii, jj;
          ii = i;
          jj = j;
          xa = '0; ya = '0;
          for (int d = 0; d < 4; d++) begin
            xa[d] = enc(ii % 3 - 1); ii /= 3;
            ya[d] = enc(jj % 3 - 1); jj /= 3;
          end
          x4 = xa[3:0]; y4 = ya[3:0];
          x8 = rnd_vec(); y8 = rnd_vec();
          @(posedge clk);
          check(4, xa, ya, {8'b0, z4});
          check(8, x8, y8, z8);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
