// AddRoundKey: the 4x4 state matrix is XORed byte by byte with the 4x4
// round-key matrix (r_ij = a_ij ^ k_ij). Because every byte position is
// XORed with the byte at the same position, the whole step is one 128-bit XOR.
// Purely combinational; used by both the cipher and the inverse cipher.
//
// The step is exactly the method's AddRoundKey; nothing here is a local choice.
module add_round_key
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t round_key_i,
  output block_t state_o
);
  assign state_o = state_i ^ round_key_i;
endmodule
