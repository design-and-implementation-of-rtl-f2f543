// Testbench of sub_bytes: every byte value in every position, both directions, against S-boxes computed from the GF(2^8) inverse and the affine map; spot checks of printed table entries.
module tb_sub_bytes;
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
  logic [127:0] s, q, e;
  sub_bytes dut (.inv_i(inv), .state_i(s), .state_o(q));

  initial begin
    for (int m = 0; m < 2; m++) begin
      inv = m[0];
      for (int v = 0; v < 256; v++) begin
        for (int i = 0; i < 16; i++) s[8*i +: 8] = 8'(v + 17*i);
        #1;
        for (int i = 0; i < 16; i++) e[8*i +: 8] = inv ? inv_sbox(s[8*i +: 8]) : sbox(s[8*i +: 8]);
        check(q == e, $sformatf("inv=%0d s=%h q=%h exp=%h", inv, s, q, e));
      end
    end
    // Table entries: S(00)=63, S(53)=ED, S(FF)=16, S^-1(00)=52, S^-1(63)=00.
    inv = 0; s = {8'h00, 8'h53, 8'hff, 104'h0}; #1;
    check(q[127:104] == 24'h63ed16, "S-box spot values");
    inv = 1; s = {8'h00, 8'h63, 112'h0}; #1;
    check(q[127:112] == 16'h5200, "inverse S-box spot values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
