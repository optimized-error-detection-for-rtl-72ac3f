// tb_sd_digit_mul: exhaustive self-checking test of the 1-by-1 SD digit
// multiplier: all nine digit pairs, p = a * b.
module tb_sd_digit_mul;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  sd_digit_t a, b, p;

  sd_digit_mul dut (.*);

  function automatic sd_digit_t enc(int v);
    return (v == 1) ? 2'b01 : (v == -1) ? 2'b11 : 2'b00;
  endfunction

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -1; i <= 1; i++)
      for (int j = -1; j <= 1; j++) begin
        a = enc(i); b = enc(j);
        @(posedge clk);
        checks++;
        if (p != enc(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d -> %b", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
