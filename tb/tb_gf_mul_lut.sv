// Testbench of gf_mul_lut: all 65536 operand pairs against the shift-and-add GF(2^8) product, covering the zero operands and both branches of the log-sum reduction.
module tb_gf_mul_lut;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  // Watchdog: a run that does not finish in time counts as a failure.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] x, y, p;
  int n_wrap = 0, n_zero = 0;
  gf_mul_lut dut (.x_i(x), .y_i(y), .p_o(p));

  // Discrete logarithm to base 03, found by stepping through the powers.
  int lg [256];

  initial begin
    logic [7:0] pw = 8'h01;
    for (int i = 0; i < 255; i++) begin lg[pw] = i; pw = gmul(pw, 8'h03); end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x = 8'(i); y = 8'(j); #1;
        check(p == gmul(x, y), $sformatf("%h * %h = %h", x, y, p));
        if (x == 0 || y == 0) n_zero++;
        else if (lg[x] + lg[y] > 255) n_wrap++;
      end
    check(n_wrap > 0 && n_zero > 0, "reduction and zero paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
