// tb_res_mul: self-checking test of the modulo 2^P+u residue multiplier.
//
// Random SD residues into the default P = 8 instance and a P = 4 instance,
// all three u (-1, +1, 0). value(prod) must equal value(a) * value(b) modulo m = 2^P + u.
module tb_res_mul;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  u_sel_t          u_sel;
  sd_digit_t [7:0] a8, b8, p8;
  sd_digit_t [3:0] a4, b4, p4;

  res_mul          dut8 (.a(a8), .b(b8), .u_sel(u_sel), .prod(p8));
  res_mul #(.P(4)) dut4 (.a(a4), .b(b4), .u_sel(u_sel), .prod(p4));

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

  task automatic check(int p, int va, int vb, sd_digit_t [7:0] got);
    int m = (1 << p) + ((u_sel == U_PLUS) ? 1 : (u_sel == U_MINUS) ? -1 : 0);
    checks++;
    if (md(val(got, p), m) != md(va * vb, m)) begin
      failures++;
      if (failures < 10)
        $display("FAIL P=%0d m=%0d a=%0d b=%0d want=%0d got=%0d", p, m, va, vb, md(va * vb, m), md(val(got, p), m));
    end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      u_sel = u_sel_t'(t % 3);
      for (int i = 0; i < 8; i++) begin
        a8[i] = enc(int'($urandom_range(2)) - 1);
        b8[i] = enc(int'($urandom_range(2)) - 1);
      end
      for (int i = 0; i < 4; i++) begin
        a4[i] = enc(int'($urandom_range(2)) - 1);
        b4[i] = enc(int'($urandom_range(2)) - 1);
      end
      @(posedge clk);
      check(8, val(a8, 8), val(b8, 8), p8);
      check(4, val({8'b0, a4}, 4), val({8'b0, b4}, 4), {8'b0, p4});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
