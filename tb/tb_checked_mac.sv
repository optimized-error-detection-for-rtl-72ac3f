// tb_checked_mac: end-to-end test of the checked product-sum unit at its
// default size (N = 32, P = 8, so m = 255 or 257).
//
// For each random operand set A, B, C it checks, under both moduli:
//   - fault-free: {z_carry, z} = A*B + C (shift-and-add reference), err = 0;
//   - a single flipped result bit: always caught (2^k is never 0 mod m);
//   - two flipped bits, either random or the pair (k, k+8), which is a
//     multiple of 255 or of 257 depending on the bit values: err must be 1
//     exactly when the change is not 0 modulo m (Horner's rule here).
// It counts each mechanism of the design and fails if any never happened:
// both moduli in use, carry out of A*B+C with no false alarm, single-bit
// detection, two-bit detection, a two-bit error missed by one modulus, and
// such an error caught after switching u. The modulus 2^P (u = 0) is run
// fault-free and with the single-bit fault, where it must catch exactly the
// flips in the low P bits.
module tb_checked_mac;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_uminus = 0, n_uplus = 0, n_uzero = 0, n_zero_caught = 0, n_carry = 0, n_single = 0, n_double = 0;
  int n_missed = 0, n_rescued = 0;

  logic [31:0]     a, b;
  logic [63:0]     c, z;
  logic            z_carry;
  logic [64:0]     fault_mask;
  u_sel_t          u_sel;
  sd_digit_t [7:0] e;
  logic            err;

  checked_mac dut (.*);

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

  function automatic int modulus(u_sel_t u);
    return (u == U_PLUS) ? 257 : (u == U_MINUS) ? 255 : 256;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%h b=%h c=%h mask=%h u=%0d err=%b", what, a, b, c,
                                  fault_mask, u_sel, err);
    end
  endtask

  // Apply one fault mask under one modulus; return the flag.
  task automatic apply(input logic [64:0] mask, input u_sel_t u, input logic [64:0] good,
                       output bit flagged);
    fault_mask = mask;
    u_sel      = u;
    @(posedge clk);
    check({z_carry, z} == (good ^ mask), "result");
    check(err == (horner(good ^ mask, modulus(u)) != horner(good, modulus(u))), "flag");
    flagged = err;
    case (u)
      U_PLUS:  n_uplus++;
      U_MINUS: n_uminus++;
      default: n_uzero++;
    endcase
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [64:0] good, m1, m2;
      bit f_minus, f_plus;
      int k, j;
      if (t == 0) begin a = '1; b = '1; c = '1; end
      else begin a = $urandom; b = $urandom; c = {$urandom, $urandom}; end
      good = ref_mac(a, b, c);
      if (good[64]) n_carry++;

      // fault-free, both moduli
      apply('0, U_MINUS, good, f_minus);
      check(!f_minus, "false alarm u=-1");
      apply('0, U_PLUS, good, f_plus);
      check(!f_plus, "false alarm u=+1");

      // one flipped bit
      m1 = '0;
      m1[$urandom_range(64)] = 1'b1;
      apply(m1, u_sel_t'(t % 2), good, f_minus);
      check(f_minus, "single-bit error missed");
      if (f_minus) n_single++;

      // two flipped bits: random pair, or a pair 8 apart
      k = int'($urandom_range(56));
      j = (t % 2 == 0) ? k + 8 : int'($urandom_range(64));
      if (j == k) j = (k + 1) % 65;
      m2 = '0;
      m2[k] = 1'b1;
      m2[j] = 1'b1;
      apply(m2, U_MINUS, good, f_minus);
      apply(m2, U_PLUS,  good, f_plus);
      if (f_minus || f_plus) n_double++;
      if (!f_minus || !f_plus) n_missed++;
      if (f_minus != f_plus) n_rescued++;

      // modulus 2^P: fault-free, then the same single-bit fault
      apply('0, U_ZERO, good, f_plus);
      check(!f_plus, "false alarm u=0");
      apply(m1, U_ZERO, good, f_plus);
      if (f_plus) n_zero_caught++;
    end
    // every mechanism must have happened
    check(n_uminus > 0, "u=-1 never used");
    check(n_uplus > 0, "u=+1 never used");
    check(n_carry > 0, "carry out never seen");
    check(n_single > 0, "no single-bit error caught");
    check(n_double > 0, "no two-bit error caught");
    check(n_missed > 0, "no two-bit error missed by a modulus");
    check(n_rescued > 0, "switching u never helped");
    check(n_uzero > 0, "u=0 never used");
    check(n_zero_caught > 0, "no error caught with m=2^P");
    $display("u=0 %0d (errors caught %0d)", n_uzero, n_zero_caught);
    $display("u=-1 %0d, u=+1 %0d, carry %0d, single caught %0d, double caught %0d, missed by one modulus %0d, caught by the other %0d",
             n_uminus, n_uplus, n_carry, n_single, n_double, n_missed, n_rescued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
