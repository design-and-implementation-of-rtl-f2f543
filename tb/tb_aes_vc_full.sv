// Full-size run of aes_vc_top with its default parameters: the FIPS-197
// Appendix B key and block are encrypted, the ciphertext is split into two
// shares, and the shares are fed back and decrypted to the original block.
module tb_aes_vc_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [127:0] KEY = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;
  localparam logic [127:0] PT  = 128'h3243f6a8_885a308d_313198a2_e0370734;
  localparam logic [127:0] CT  = 128'h3925841d_02dc09fb_dc118597_196a0b32;

  logic         rst_n, key_valid, key_ready, in_valid, in_ready, in_dec, bad;
  logic         out_valid, out_ready, out_dec;
  logic [127:0] key, in_block, in_rnd, out_block;
  logic [255:0] in_s1, in_s2, out_s1, out_s2;

  aes_vc_top dut (
    .clk(clk), .rst_n(rst_n),
    .key_valid_i(key_valid), .key_ready_o(key_ready), .key_i(key),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_decrypt_i(in_dec),
    .in_block_i(in_block), .in_share1_i(in_s1), .in_share2_i(in_s2), .in_rnd_i(in_rnd),
    .in_share_bad_o(bad),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_decrypt_o(out_dec),
    .out_block_o(out_block), .out_share1_o(out_s1), .out_share2_o(out_s2)
  );

  initial begin
    rst_n = 0; key_valid = 0; in_valid = 0; in_dec = 0; out_ready = 1;
    key = KEY; in_block = PT; in_rnd = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;
    in_s1 = '0; in_s2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); key_valid = 1;
    @(negedge clk); key_valid = 0;
    // Encrypt.
    in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    check(out_block == CT && !out_dec, $sformatf("ciphertext %h", out_block));
    check(out_s1 != out_s2, "the two shares differ");
    in_s1 = out_s1; in_s2 = out_s2;
    @(negedge clk);
    // Decrypt from the shares.
    in_dec = 1; in_block = '0; in_valid = 1;
    #1 check(!bad, "shares well formed");
    while (!in_ready) @(negedge clk);
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    check(out_block == PT && out_dec, $sformatf("plaintext %h", out_block));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
