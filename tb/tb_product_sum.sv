// tb_product_sum: self-checking test of the binary product-sum circuit at the
// default N = 32. The reference is a shift-and-add multiply in the testbench;
// corner cases with all-one operands make the carry out appear.
module tb_product_sum;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_carry = 0;

  logic [31:0] a, b;
  logic [63:0] c, z;
  logic        z_carry;

  product_sum dut (.*);

  function automatic logic [64:0] ref_mac(logic [31:0] x, logic [31:0] y, logic [63:0] w);
    logic [64:0] acc = {1'b0, w};
    for (int i = 0; i < 32; i++) if (y[i]) acc += (65'(x) << i);
    return acc;
  endfunction

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10000; t++) begin
      if (t == 0) begin a = '1; b = '1; c = '1; end
      else begin
        a = $urandom; b = $urandom; c = {$urandom, $urandom};
      end
      @(posedge clk);
      checks++;
      if ({z_carry, z} != ref_mac(a, b, c)) begin
        failures++;
        if (failures < 10) $display("FAIL %h * %h + %h -> %b %h", a, b, c, z_carry, z);
      end
      if (z_carry) n_carry++;
    end
    checks++;
    if (n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
