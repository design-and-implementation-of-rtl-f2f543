// Testbench of aes_core: FIPS-197 known answers, random blocks and keys in both directions against the reference model, the 10-clock latency, output back-pressure, and a key change between blocks.
module tb_aes_core;
  import aes_ref_pkg::*;
  import aes_pkg::*;

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

  logic         rst_n;
  logic         key_valid, key_ready, in_valid, in_ready, in_dec;
  logic         out_valid, out_ready, out_dec;
  logic [127:0] key, in_block, out_block;
  int           n_stall = 0;

  aes_core dut (
    .clk(clk), .rst_n(rst_n),
    .key_valid_i(key_valid), .key_ready_o(key_ready), .key_i(key),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_decrypt_i(in_dec), .in_block_i(in_block),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_decrypt_o(out_dec), .out_block_o(out_block)
  );

  task automatic load_key(logic [127:0] k);
    @(negedge clk);
    key = k; key_valid = 1;
    while (!key_ready) @(negedge clk);
    @(negedge clk); key_valid = 0;
  endtask

  // One request; checks the result, the latency and, if stall > 0, that the
  // result holds while out_ready is low.
  task automatic run(bit dec, logic [127:0] blk, logic [127:0] expv, int stall);
    int lat;
    @(negedge clk);
    in_dec = dec; in_block = blk; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk); in_valid = 0;          // accepted at the edge just passed
    lat = 0;   // clock edges since the accepting edge
    while (!out_valid) begin @(negedge clk); lat++; end
    check(lat == 10, $sformatf("latency %0d clocks", lat));
    check(out_block == expv && out_dec == dec,
          $sformatf("dec=%0d in=%h out=%h want=%h", dec, blk, out_block, expv));
    if (stall > 0) begin
      n_stall++;
      out_ready = 0;
      repeat (stall) begin
        @(negedge clk);
        check(out_valid && out_block == expv, "result held under back-pressure");
      end
    end
    out_ready = 1;
    @(negedge clk);
    check(!out_valid, "result released after handshake");
  endtask

  initial begin
    logic [127:0] k, p;
    rst_n = 0; key_valid = 0; in_valid = 0; in_dec = 0; key = '0; in_block = '0; out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!in_ready, "no block accepted before a key is loaded");
    // FIPS-197 Appendix B and C.1.
    load_key(128'h2b7e1516_28aed2a6_abf71588_09cf4f3c);
    run(0, 128'h3243f6a8_885a308d_313198a2_e0370734, 128'h3925841d_02dc09fb_dc118597_196a0b32, 0);
    run(1, 128'h3925841d_02dc09fb_dc118597_196a0b32, 128'h3243f6a8_885a308d_313198a2_e0370734, 3);
    load_key(128'h00010203_04050607_08090a0b_0c0d0e0f);
    run(0, 128'h00112233_44556677_8899aabb_ccddeeff, 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, 2);
    run(1, 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, 128'h00112233_44556677_8899aabb_ccddeeff, 0);
    for (int n = 0; n < 12; n++) begin
      k = rand128(); p = rand128();
      load_key(k);
      run(0, p, encrypt(p, k), n % 3);
      run(1, p, decrypt(p, k), (n + 1) % 3);
    end
    check(n_stall > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
