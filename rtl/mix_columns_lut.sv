// MixColumns / InvMixColumns with table-based multiplication.
//
// Same matrices as the shift-and-XOR version (02 03 01 01 circulant for
// encryption, 0E 0B 0D 09 for decryption, selected by inv_i), but every one
// of the 64 constant products of the state is formed by a gf_mul_lut
// log/antilog multiplier and the four products of a row are XORed.
// Combinational.
//
// Using the table multiplier for MixColumns is the method's; one multiplier
// per product (64, no sharing, no clock) is this design's choice.
module mix_columns_lut
  import aes_pkg::*;
(
  input  logic   inv_i,
  input  block_t state_i,
  output block_t state_o
);
  byte_t k [4];

  always_comb begin
    if (inv_i) k = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else       k = '{8'h02, 8'h03, 8'h01, 8'h01};
  end

  // prod[c][r][j]: state byte (j, c) times matrix entry (r, j).
  byte_t prod [4][4][4];

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      for (genvar j = 0; j < 4; j++) begin : g_term
        gf_mul_lut u_mul (
          .x_i (state_i[127 - 8*(4*c + j) -: 8]),
          .y_i (k[(j + 4 - r) % 4]),
          .p_o (prod[c][r][j])
        );
      end
      assign state_o[127 - 8*(4*c + r) -: 8] =
          prod[c][r][0] ^ prod[c][r][1] ^ prod[c][r][2] ^ prod[c][r][3];
    end
  end
endmodule
