// Testbench of shift_rows: random states in both directions against an index-based reference, the printed example pattern, and the inverse undoing the forward shift.
module tb_shift_rows;
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

  logic         inv;
  logic [127:0] s, q, s2, q2;
  shift_rows dut  (.inv_i(inv),  .state_i(s),  .state_o(q));
  shift_rows dut2 (.inv_i(1'b1), .state_i(s2), .state_o(q2));

  initial begin
    // Byte (r,c) holds 8'h(r+1)(c+1): after the left shift row 2 reads
    // 22 23 24 21, row 3 reads 33 34 31 32, row 4 reads 44 41 42 43.
    inv = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) s[127 - 8*(4*c + r) -: 8] = 8'((r + 1) * 16 + c + 1);
    #1;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        check(gb(q, r, c) == 8'((r + 1) * 16 + ((c + r) % 4) + 1),
              $sformatf("pattern row %0d col %0d = %h", r, c, gb(q, r, c)));
    for (int n = 0; n < 400; n++) begin
      inv = n[0]; s = rand128(); s2 = q; #1;
      check(q == sr(s, inv), $sformatf("inv=%0d s=%h q=%h", inv, s, q));
      if (!inv) begin s2 = q; #1; check(q2 == s, "inverse undoes forward"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
