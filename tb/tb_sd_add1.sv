// tb_sd_add1: exhaustive self-checking test of the first SD addition cell.
//
// Drives all 81 combinations of x_i, y_i, x_{i-1}, y_{i-1} in {-1,0,1} and
// checks: the outputs are valid digit codes, x_i + y_i = 2 c_i + s_i, and
// s_i leans the right way (s_i <= 0 when both lower digits are >= 0, s_i >= 0
// otherwise), which is what keeps the second stage carry-free.
module tb_sd_add1;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  sd_digit_t x_i, y_i, x_im1, y_im1, c_i, s_i;

  sd_add1 dut (.*);

  function automatic sd_digit_t enc(int v);
    return (v == 1) ? 2'b01 : (v == -1) ? 2'b11 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return (d == 2'b01) ? 1 : (d == 2'b11) ? -1 : 0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%0d y=%0d xl=%0d yl=%0d -> c=%0d s=%0d", what,
               dec(x_i), dec(y_i), dec(x_im1), dec(y_im1), dec(c_i), dec(s_i));
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        for (int al = -1; al <= 1; al++)
          for (int bl = -1; bl <= 1; bl++) begin
            x_i = enc(a); y_i = enc(b); x_im1 = enc(al); y_im1 = enc(bl);
            @(posedge clk);
            check(c_i != 2'b10 && s_i != 2'b10, "code");
            check(a + b == 2 * dec(c_i) + dec(s_i), "value");
            if (al >= 0 && bl >= 0) check(dec(s_i) <= 0, "lean-neg");
            else                    check(dec(s_i) >= 0, "lean-pos");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
