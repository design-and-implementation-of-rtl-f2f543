// SubBytes / InvSubBytes: each of the 16 state bytes is replaced through the
// S-box (inv_i = 0) or the inverse S-box (inv_i = 1). Sixteen table
// look-ups run in parallel, so the step is combinational and takes no clock.
//
// The tables are the standard AES ones; doing all 16 look-ups in parallel is
// this design's choice.
module sub_bytes
  import aes_pkg::*;
(
  input  logic   inv_i,
  input  block_t state_i,
  output block_t state_o
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    sbox u_sbox (
      .inv_i (inv_i),
      .a_i   (state_i[8*i +: 8]),
      .q_o   (state_o[8*i +: 8])
    );
  end
endmodule
