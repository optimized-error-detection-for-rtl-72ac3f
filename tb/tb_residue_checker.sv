// tb_residue_checker: self-checking test of the SD residue checker at the
// default N = 32, P = 8.
//
// For random A, B, C the correct Z = A*B + C (65 bits) is computed here by
// shift-and-add. Half of the vectors present the correct Z (err must be 0);
// the rest flip 1 to 3 random bits of Z, and err must be 1 exactly when the
// flipped word differs from the correct one modulo m = 2^P + u (Horner's
// rule in the testbench). All three u (-1, +1, 0) are used.
module tb_residue_checker;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_err = 0, n_ok = 0;

  logic [31:0]     a, b;
  logic [63:0]     c;
  logic [64:0]     z;
  u_sel_t          u_sel;
  sd_digit_t [7:0] e;
  logic            err;

  residue_checker dut (.*);

  function automatic logic [64:0] ref_mac(logic [31:0] x, logic [31:0] y, logic [63:0] w);
    logic [64:0] acc = {1'b0, w};
    for (int i = 0; i < 32; i++) if (y[i]) acc += (65'(x) << i);
    return acc;
  endfunction

  function automatic int horner(logic [64:0] w, int m);
    int r = 0;
    for (int i = 64; i >= 0; i--) r = (2 * r + int'(w[i])) % m;
    return r;
  endfunction

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [64:0] good;
      int m;
      bit want;
      u_sel = u_sel_t'(t % 3);
      m = (u_sel == U_PLUS) ? 257 : (u_sel == U_MINUS) ? 255 : 256;
      a = $urandom; b = $urandom; c = {$urandom, $urandom};
      good = ref_mac(a, b, c);
      z = good;
      if ((t / 2) % 2 == 1) begin
        int nflip;
        nflip = int'($urandom_range(1, 3));
        for (int k = 0; k < nflip; k++) z[$urandom_range(64)] ^= 1'b1;
      end
      want = horner(z, m) != horner(good, m);
      @(posedge clk);
      checks++;
      if (err != want) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d good=%h z=%h err=%b", m, good, z, err);
      end
      if (err) n_err++; else n_ok++;
    end
    checks++;
    if (n_err == 0 || n_ok == 0) failures++;
    $display("errors flagged %0d, clean %0d", n_err, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
