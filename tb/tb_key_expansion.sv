// Testbench of key_expansion: the FIPS-197 example key schedule, random keys against the reference schedule, and the 10-clock schedule time.
module tb_key_expansion;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          rst_n, start, busy, valid;
  logic [127:0]  key;
  logic [127:0]  rk [11];
  logic [10:0][127:0] rko;
  rk_t           e;
  int            cyc;
  key_expansion dut (.clk(clk), .rst_n(rst_n), .start_i(start), .key_i(key),
                     .busy_o(busy), .valid_o(valid), .round_keys_o(rko));

  task automatic run(logic [127:0] k);
    @(negedge clk); key = k; start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!valid) begin @(negedge clk); cyc++; check(cyc <= 10 ? busy || valid : 0, "busy while expanding"); end
    check(cyc == 10, $sformatf("schedule took %0d clocks", cyc));
    e = expand(k);
    for (int i = 0; i <= 10; i++) check(rko[i] == e[i], $sformatf("key %h round %0d = %h, want %h", k, i, rko[i], e[i]));
  endtask

  initial begin
    rst_n = 0; start = 0; key = '0;
    repeat (3) @(negedge clk);
    check(!valid && !busy, "idle after reset");
    rst_n = 1;
    run(128'h2b7e1516_28aed2a6_abf71588_09cf4f3c);
    check(rko[1]  == 128'ha0fafe17_88542cb1_23a33939_2a6c7605, "FIPS-197 round key 1");
    check(rko[10] == 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6, "FIPS-197 round key 10");
    for (int n = 0; n < 20; n++) run(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
