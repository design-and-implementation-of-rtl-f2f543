// One 256 x 8 look-up table, read combinationally. Used for the S-box, the
// inverse S-box and the GF(2^8) logarithm and antilogarithm tables; the
// TABLE parameter names the table. The contents are computed at elaboration
// time by aes_pkg::make_table from the tables' definitions:
//   TBL_SBOX      S(a) = affine(a^-1), with 0^-1 taken as 0
//   TBL_INV_SBOX  the inverse permutation of the S-box
//   TBL_EXP       E(i) = 03^i for i = 0..255 (so E(255) = E(0) = 01)
//   TBL_LOG       L(a) = i with 03^i = a for a = 1..255; L(0) = 0, unused
// They agree entry by entry with the tables printed for the method. The
// constant table becomes a ROM or plain logic in synthesis.
module sbox_rom
  import aes_pkg::*;
#(
  parameter table_e TABLE = TBL_SBOX
) (
  input  logic [7:0] addr_i,
  output logic [7:0] data_o
);
  localparam table_t ROM = make_table(TABLE);

  assign data_o = ROM[addr_i];
endmodule
