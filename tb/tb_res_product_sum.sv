// tb_res_product_sum: self-checking test of the residue product-sum circuit.
//
// Random SD residues a, b, c at the default P = 8, all three u (-1, +1, 0).
// value(z) must equal value(a) * value(b) + value(c) modulo m = 2^P + u.
module tb_res_product_sum;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  u_sel_t          u_sel;
  sd_digit_t [7:0] a, b, c, z;

  res_product_sum dut (.*);

  function automatic sd_digit_t enc(int v);
    return (v == 1) ? 2'b01 : (v == -1) ? 2'b11 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return (d == 2'b01) ? 1 : (d == 2'b11) ? -1 : 0;
  endfunction

  function automatic int val(sd_digit_t [7:0] v);
    int r = 0;
    for (int i = 7; i >= 0; i--) r = 2 * r + dec(v[i]);
    return r;
  endfunction

  function automatic int md(int v, int m);
    return ((v % m) + m) % m;
  endfunction

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int m;
      u_sel = u_sel_t'(t % 3);
      m = (u_sel == U_PLUS) ? 257 : (u_sel == U_MINUS) ? 255 : 256;
      for (int i = 0; i < 8; i++) begin
        a[i] = enc(int'($urandom_range(2)) - 1);
        b[i] = enc(int'($urandom_range(2)) - 1);
        c[i] = enc(int'($urandom_range(2)) - 1);
      end
      @(posedge clk);
      checks++;
      if (md(val(z), m) != md(val(a) * val(b) + val(c), m)) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d a=%0d b=%0d c=%0d z=%0d", m, val(a), val(b), val(c), val(z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
