// tb_bin2res: self-checking test of the binary-to-residue converter.
//
// Instances for W = 32 and 65 bits at P = 8 and W = 64 at P = 4 get random
// words plus all-zero and all-one words, with all three u (-1, +1, 0). The SD value of the
// residue must equal the word modulo m = 2^P + u, computed here bit by bit
// with Horner's rule.
module tb_bin2res;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  u_sel_t          u_sel;
  logic [64:0]     word;
  sd_digit_t [7:0] r32, r65;
  sd_digit_t [3:0] r64;

  bin2res                   dut32 (.bin(word[31:0]), .u_sel(u_sel), .res(r32));
  bin2res #(.W(65), .P(8))  dut65 (.bin(word),       .u_sel(u_sel), .res(r65));
  bin2res #(.W(64), .P(4))  dut64 (.bin(word[63:0]), .u_sel(u_sel), .res(r64));

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

  function automatic int horner(logic [64:0] w, int nbits, int m);
    int r = 0;
    for (int i = nbits - 1; i >= 0; i--) r = (2 * r + int'(w[i])) % m;
    return r;
  endfunction

  task automatic check(int nbits, int p, sd_digit_t [7:0] got);
    int m = (1 << p) + ((u_sel == U_PLUS) ? 1 : (u_sel == U_MINUS) ? -1 : 0);
    checks++;
    if (md(val(got, p), m) != horner(word, nbits, m)) begin
      failures++;
      if (failures < 10)
        $display("FAIL W=%0d P=%0d m=%0d word=%h want=%0d got=%0d", nbits, p, m, word,
                 horner(word, nbits, m), md(val(got, p), m));
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
      if (t < 2)      word = '0;
      else if (t < 4) word = '1;
      else            word = {$urandom_range(1), $urandom, $urandom};
      @(posedge clk);
      check(32, 8, r32);
      check(65, 8, r65);
      check(64, 4, {8'b0, r64});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
