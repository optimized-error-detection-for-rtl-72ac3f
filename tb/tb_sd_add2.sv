// tb_sd_add2: exhaustive self-checking test of the second SD addition cell.
//
// Drives every pair (s_i, c_{i-1}) that the first stage can produce together
// (never both +1 or both -1) and checks z_i = s_i + c_{i-1}.
module tb_sd_add2;
  import sd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  sd_digit_t s_i, c_im1, z_i;

  sd_add2 dut (.*);

  function automatic sd_digit_t enc(int v);
    return (v == 1) ? 2'b01 : (v == -1) ? 2'b11 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return (d == 2'b01) ? 1 : (d == 2'b11) ? -1 : 0;
  endfunction

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = -1; s <= 1; s++)
      for (int c = -1; c <= 1; c++) begin
        if (s != 0 && s == c) continue;
        s_i = enc(s); c_im1 = enc(c);
        @(posedge clk);
        checks++;
        if (z_i != enc(s + c)) begin
          failures++;
          $display("FAIL s=%0d c=%0d z=%b", s, c, z_i);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
