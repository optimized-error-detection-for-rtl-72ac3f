// tb_res_error_detect: self-checking test of the subtraction circuit and the
// error flag.
//
// z_res is a random SD residue; z_pred is either random, the same digits,
// a different SD form of the same value, or a form of value(z_res) +- m when
// that fits in P digits, or both are 0 or +-(2^P - 1) written as all +1 or
// all -1 digits. Checks value(e) = value(z_res) - value(z_pred)
// modulo m and err = (that difference is not 0 modulo m), at the default
// P = 8 and all three u (-1, +1, 0). Counts how often the flag was raised and cleared
// and how often E came out as all +1 or all -1 digits.
module tb_res_error_detect;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_err = 0, n_ok = 0, n_wrap = 0;

  u_sel_t          u_sel;
  sd_digit_t [7:0] z_res, z_pred, e;
  logic            err;

  res_error_detect dut (.*);

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

  // Some SD form of v, |v| < 256: plain binary digits with the sign of v.
  function automatic sd_digit_t [7:0] to_sd(int v);
    sd_digit_t [7:0] r;
    int a = (v < 0) ? -v : v;
    for (int i = 0; i < 8; i++) r[i] = ((a >> i) & 1) ? enc((v < 0) ? -1 : 1) : enc(0);
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
      int m, kind, v;
      u_sel = u_sel_t'(t % 3);
      m = (u_sel == U_PLUS) ? 257 : (u_sel == U_MINUS) ? 255 : 256;
      for (int i = 0; i < 8; i++) z_res[i] = enc(int'($urandom_range(2)) - 1);
      v = val(z_res);
      kind = int'($urandom_range(4));
      if (kind == 4) begin
        // residues written as +-(2^P - 1) or 0: the subtraction can then
        // leave E as all +1 or all -1 digits, which is 0 modulo 2^P - 1
        int r1, r2;
        r1 = int'($urandom_range(2));
        r2 = int'($urandom_range(2));
        z_res = (r1 == 0) ? '0 : (r1 == 1) ? {8{SD_POS}} : {8{SD_NEG}};
        v = val(z_res);
        z_pred = (r2 == 0) ? '0 : (r2 == 1) ? {8{SD_POS}} : {8{SD_NEG}};
      end
      case (kind)
        0: for (int i = 0; i < 8; i++) z_pred[i] = enc(int'($urandom_range(2)) - 1);
        1: z_pred = z_res;
        2: z_pred = to_sd(v);
        3: begin
          if (v + m < 256 && v + m > -256)      z_pred = to_sd(v + m);
          else if (v - m < 256 && v - m > -256) z_pred = to_sd(v - m);
          else                                  z_pred = to_sd(v);
        end
        default: ;
      endcase
      @(posedge clk);
      checks += 2;
      if (md(val(e), m) != md(val(z_res) - val(z_pred), m)) begin
        failures++;
        if (failures < 10) $display("FAIL e: m=%0d %0d - %0d -> %0d", m, val(z_res), val(z_pred), val(e));
      end
      if (err != (md(val(z_res) - val(z_pred), m) != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL err: m=%0d %0d - %0d e=%0d err=%b", m, val(z_res), val(z_pred), val(e), err);
      end
      if (err) n_err++; else n_ok++;
      if (e == {8{SD_POS}} || e == {8{SD_NEG}}) n_wrap++;
    end
    checks++;
    if (n_err == 0 || n_ok == 0 || n_wrap == 0) failures++;
    $display("flag raised %0d times, clear %0d times, E = +-(2^P-1) %0d times", n_err, n_ok, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
