// AES-128 with visual cryptography: the complete data path.
//
// Encryption: a 128-bit block (the 4x4 byte matrix) is enciphered by the
// AES-128 core, and the ciphertext, read as an image of 128 one-bit pixels,
// is split by the visual-cryptography encoder into two 256-bit shares. Either
// share alone is random; the ciphertext comes back only when both are
// stacked. Decryption runs the other way: the two shares are stacked by the
// decoder, which restores the ciphertext, and the core deciphers it.
//
// Interface:
//   key_*        load a cipher key (valid/ready); the key schedule then
//                takes 10 clocks before blocks are accepted.
//   in_*         one request per valid/ready handshake. in_decrypt_i = 0:
//                encrypt in_block_i, using in_rnd_i as the random bits of the
//                shares (one per pixel). in_decrypt_i = 1: decrypt the block
//                held by in_share1_i / in_share2_i; in_block_i is unused.
//                in_share_bad_o flags malformed shares (combinational).
//   out_*        the result, held until out_ready_i: out_block_o is the
//                ciphertext (encryption) or the plaintext (decryption);
//                out_share1_o / out_share2_o are the shares of the
//                ciphertext and are meaningful only when out_decrypt_o = 0.
// Timing: 10 clocks from the accepted request to out_valid_o (one AES round
// per clock); the encoder and decoder are combinational. MIX_IMPL selects
// the MixColumns circuit (shift-and-XOR by default, or log/antilog tables).
// Bit i of a block is pixel i. The random bits are latched with the request
// so that the shares stay stable while the result waits. Reset is
// synchronous and active low.
//
// The chain (AES, then visual cryptography; reversed for decryption) is the
// method's; doing both directions in hardware, one pixel per ciphertext bit
// and the port list are this design's choices.
module aes_vc_top
  import aes_pkg::*;
#(
  parameter mix_impl_e MIX_IMPL = MIX_ADD_SHIFT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_valid_i,
  output logic         key_ready_o,
  input  block_t       key_i,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  logic         in_decrypt_i,
  input  block_t       in_block_i,
  input  logic [255:0] in_share1_i,
  input  logic [255:0] in_share2_i,
  input  block_t       in_rnd_i,
  output logic         in_share_bad_o,
  output logic         out_valid_o,
  input  logic         out_ready_i,
  output logic         out_decrypt_o,
  output block_t       out_block_o,
  output logic [255:0] out_share1_o,
  output logic [255:0] out_share2_o
);
  block_t stacked_ct, core_in, rnd_q;

  vc_decode #(.N(128)) u_vc_dec (
    .share1_i (in_share1_i),
    .share2_i (in_share2_i),
    .pixel_o  (stacked_ct),
    .bad_o    (in_share_bad_o)
  );

  assign core_in = in_decrypt_i ? stacked_ct : in_block_i;

  aes_core #(.MIX_IMPL(MIX_IMPL)) u_core (
    .clk           (clk),
    .rst_n         (rst_n),
    .key_valid_i   (key_valid_i),
    .key_ready_o   (key_ready_o),
    .key_i         (key_i),
    .in_valid_i    (in_valid_i),
    .in_ready_o    (in_ready_o),
    .in_decrypt_i  (in_decrypt_i),
    .in_block_i    (core_in),
    .out_valid_o   (out_valid_o),
    .out_ready_i   (out_ready_i),
    .out_decrypt_o (out_decrypt_o),
    .out_block_o   (out_block_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                      rnd_q <= '0;
    else if (in_valid_i && in_ready_o) rnd_q <= in_rnd_i;
  end

  vc_encode #(.N(128)) u_vc_enc (
    .pixel_i  (out_block_o),
    .rnd_i    (rnd_q),
    .share1_o (out_share1_o),
    .share2_o (out_share2_o)
  );
endmodule
