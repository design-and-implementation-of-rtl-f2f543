// MixColumns / InvMixColumns built from shifts and XORs ("adds and shifts").
//
// Each column (s0..s3) is multiplied in GF(2^8) by the circulant matrix
//   encryption (inv_i = 0):  02 03 01 01      decryption (inv_i = 1):  0E 0B 0D 09
//                            01 02 03 01                               09 0E 0B 0D
//                            01 01 02 03                               0D 09 0E 0B
//                            03 01 01 02                               0B 0D 09 0E
// A constant product is split into powers of two: multiplying by 02 is a
// one-bit left shift with a conditional XOR of 1B (xtime), 04 and 08 are two
// and three such steps, and the GF(2^8) addition of the partial products is
// XOR. So 03 = 02^01, 09 = 08^01, 0B = 08^02^01, 0D = 08^04^01,
// 0E = 08^04^02. No tables and no clock: the unit is combinational.
//
// The matrices and the shift-and-add approach are the method's; the exact
// split of each constant into powers of two is this design's.
module mix_columns_add_shift
  import aes_pkg::*;
(
  input  logic   inv_i,
  input  block_t state_i,
  output block_t state_o
);
  // Product of a with one of the constants 01, 02, 03, 09, 0B, 0D, 0E.
  // Only the low four bits of the constant are needed (all constants < 10h).
  function automatic byte_t cmul(byte_t a, logic [3:0] k);
    byte_t x2, x4, x8, p;
    x2 = xtime(a);
    x4 = xtime(x2);
    x8 = xtime(x4);
    p  = '0;
    if (k[0]) p ^= a;
    if (k[1]) p ^= x2;
    if (k[2]) p ^= x4;
    if (k[3]) p ^= x8;
    return p;
  endfunction

  always_comb begin
    byte_t k [4];
    byte_t acc;
    // First row of the circulant matrix; row r uses it rotated right by r.
    if (inv_i) k = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else       k = '{8'h02, 8'h03, 8'h01, 8'h01};
    state_o = '0;
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        acc = '0;
        for (int j = 0; j < 4; j++)
          acc ^= cmul(state_byte(state_i, j, c), k[(j + 4 - r) % 4][3:0]);
        state_o = with_byte(state_o, r, c, acc);
      end
    end
  end
endmodule
