// Testbench of mix_columns_lut: known columns, random states in both directions against a reference built from the shift-and-add GF(2^8) product, and InvMixColumns undoing MixColumns.
module tb_mix_columns_lut;
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
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         inv;
  logic [127:0] s, q, s2, q2;
  mix_columns_lut dut  (.inv_i(inv),  .state_i(s),  .state_o(q));
  mix_columns_lut dut2 (.inv_i(1'b1), .state_i(s2), .state_o(q2));

  initial begin
    // Known columns: db 13 53 45 -> 8e 4d a1 bc, f2 0a 22 5c -> 9f dc 58 9d,
    // 01 01 01 01 -> unchanged, c6 c6 c6 c6 -> unchanged.
    inv = 0;
    s = 128'hdb135345_f20a225c_01010101_c6c6c6c6; #1;
    check(q == 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, $sformatf("known columns %h", q));
    inv = 1;
    s = 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6; #1;
    check(q == 128'hdb135345_f20a225c_01010101_c6c6c6c6, $sformatf("known inverse columns %h", q));
    for (int n = 0; n < 400; n++) begin
      inv = n[0]; s = rand128();
      if (n < 4) s = {16{8'(n * 85)}};
      #1;
      check(q == mc(s, inv), $sformatf("inv=%0d s=%h q=%h", inv, s, q));
      if (!inv) begin s2 = q; #1; check(q2 == s, "inverse undoes forward"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
