// Testbench of add_round_key: random states and keys against a byte-by-byte XOR.
module tb_add_round_key;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] a, k, r, exp_r;
  add_round_key dut (.state_i(a), .round_key_i(k), .state_o(r));

  initial begin
    for (int n = 0; n < 500; n++) begin
      a = rand128(); k = rand128();
      if (n == 0) begin a = '0; k = '1; end
      #1;
      for (int row = 0; row < 4; row++)
        for (int col = 0; col < 4; col++)
          exp_r[127 - 8*(4*col + row) -: 8] = gb(a, row, col) ^ gb(k, row, col);
      check(r == exp_r, $sformatf("a=%h k=%h r=%h", a, k, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
