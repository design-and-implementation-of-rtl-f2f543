// End-to-end testbench of aes_vc_top. Two copies of the design run in
// lockstep on the same stimulus, one with the shift-and-XOR MixColumns and
// one with the log/antilog table MixColumns. Each request is checked against
// the reference model: encryption must return the FIPS-197 / reference
// ciphertext and two well-formed shares that stack to it; decryption is fed
// those shares and must return the plaintext. Also exercised and counted:
// key reloads, output back-pressure, malformed shares and the 10-clock
// latency. A mechanism that never happens counts as a failure.
module tb_aes_vc_top;
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

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         rst_n, key_valid, in_valid, in_dec, out_ready;
  logic [127:0] key, in_block, in_rnd;
  logic [255:0] in_s1, in_s2;

  logic         key_ready [2], in_ready [2], bad [2], out_valid [2], out_dec [2];
  logic [127:0] out_block [2];
  logic [255:0] out_s1 [2], out_s2 [2];

  aes_vc_top dut_as (
    .clk(clk), .rst_n(rst_n),
    .key_valid_i(key_valid), .key_ready_o(key_ready[0]), .key_i(key),
    .in_valid_i(in_valid), .in_ready_o(in_ready[0]), .in_decrypt_i(in_dec),
    .in_block_i(in_block), .in_share1_i(in_s1), .in_share2_i(in_s2), .in_rnd_i(in_rnd),
    .in_share_bad_o(bad[0]),
    .out_valid_o(out_valid[0]), .out_ready_i(out_ready), .out_decrypt_o(out_dec[0]),
    .out_block_o(out_block[0]), .out_share1_o(out_s1[0]), .out_share2_o(out_s2[0])
  );

  aes_vc_top #(.MIX_IMPL(MIX_LUT)) dut_lut (
    .clk(clk), .rst_n(rst_n),
    .key_valid_i(key_valid), .key_ready_o(key_ready[1]), .key_i(key),
    .in_valid_i(in_valid), .in_ready_o(in_ready[1]), .in_decrypt_i(in_dec),
    .in_block_i(in_block), .in_share1_i(in_s1), .in_share2_i(in_s2), .in_rnd_i(in_rnd),
    .in_share_bad_o(bad[1]),
    .out_valid_o(out_valid[1]), .out_ready_i(out_ready), .out_decrypt_o(out_dec[1]),
    .out_block_o(out_block[1]), .out_share1_o(out_s1[1]), .out_share2_o(out_s2[1])
  );

  int n_enc = 0, n_dec = 0, n_key = 0, n_stall = 0, n_bad = 0;

  task automatic load_key(logic [127:0] k);
    @(negedge clk);
    key = k; key_valid = 1;
    while (!(key_ready[0] && key_ready[1])) @(negedge clk);
    @(negedge clk); key_valid = 0;
    n_key++;
  endtask

  // Stack two shares the way printed transparencies combine.
  function automatic logic [127:0] stack(logic [255:0] a, logic [255:0] b);
    logic [127:0] p;
    for (int i = 0; i < 128; i++) p[i] = &(a[2*i +: 2] | b[2*i +: 2]);
    return p;
  endfunction

  function automatic bit well_formed(logic [255:0] s);
    for (int i = 0; i < 128; i++) if (s[2*i] == s[2*i+1]) return 0;
    return 1;
  endfunction

  logic [255:0] sh1, sh2;

  // One request on both copies. For encryption the shares of copy 0 are kept
  // in sh1/sh2 for a later decryption.
  task automatic run(bit dec, logic [127:0] blk, logic [127:0] expv, int stall);
    int lat;
    @(negedge clk);
    in_dec = dec; in_block = dec ? rand128() : blk; in_rnd = rand128(); in_valid = 1;
    if (dec) begin in_s1 = sh1; in_s2 = sh2; end
    else     begin in_s1 = {rand128(), rand128()}; in_s2 = {rand128(), rand128()}; end
    while (!(in_ready[0] && in_ready[1])) @(negedge clk);
    #1;
    if (dec) check(!bad[0] && !bad[1], "well-formed shares flagged");
    @(negedge clk); in_valid = 0;
    lat = 0;
    while (!(out_valid[0] && out_valid[1])) begin @(negedge clk); lat++; end
    check(lat == 10, $sformatf("latency %0d clocks", lat));
    for (int d = 0; d < 2; d++) begin
      check(out_block[d] == expv && out_dec[d] == dec,
            $sformatf("copy %0d dec=%0d out=%h want=%h", d, dec, out_block[d], expv));
      if (!dec) begin
        check(well_formed(out_s1[d]) && well_formed(out_s2[d]), "shares well formed");
        check(stack(out_s1[d], out_s2[d]) == expv, "stacked shares give the ciphertext");
      end
    end
    if (!dec) begin
      // Both copies latched the same random bits, so their shares agree.
      check(out_s1[0] == out_s1[1] && out_s2[0] == out_s2[1], "shares of both copies agree");
      sh1 = out_s1[0]; sh2 = out_s2[0]; n_enc++;
    end else n_dec++;
    if (stall > 0) begin
      out_ready = 0; n_stall++;
      repeat (stall) begin
        @(negedge clk);
        check(out_valid[0] && out_block[0] == expv && out_s1[0] == (dec ? out_s1[0] : sh1),
              "result and shares held under back-pressure");
      end
    end
    out_ready = 1;
    @(negedge clk);
    check(!out_valid[0] && !out_valid[1], "result released");
  endtask

  initial begin
    logic [127:0] k, p, c;
    rst_n = 0; key_valid = 0; in_valid = 0; in_dec = 0; out_ready = 1;
    key = '0; in_block = '0; in_rnd = '0; in_s1 = '0; in_s2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 Appendix C.1 through the whole chain.
    load_key(128'h00010203_04050607_08090a0b_0c0d0e0f);
    run(0, 128'h00112233_44556677_8899aabb_ccddeeff, 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, 2);
    run(1, 'x, 128'h00112233_44556677_8899aabb_ccddeeff, 0);
    for (int n = 0; n < 10; n++) begin
      if (n % 3 == 0) begin k = rand128(); load_key(k); end
      p = rand128(); c = encrypt(p, k);
      run(0, p, c, n % 2);
      // Malformed shares are flagged by the decoder.
      @(negedge clk);
      in_s1 = sh1; in_s2 = sh2;
      in_s1[2*(n * 7 % 128) +: 2] = 2'b00;
      #1;
      check(bad[0] && bad[1], "malformed share flagged");
      n_bad++;
      run(1, 'x, p, (n + 1) % 3);
    end
    check(n_enc > 0, "encryption through the encoder happened");
    check(n_dec > 0, "decryption from shares happened");
    check(n_key > 1, "key reload happened");
    check(n_stall > 0, "output back-pressure happened");
    check(n_bad > 0, "malformed share detection happened");
    $display("events: encrypt=%0d decrypt=%0d key_loads=%0d stalls=%0d bad_shares=%0d",
             n_enc, n_dec, n_key, n_stall, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
