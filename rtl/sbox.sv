// One byte of SubBytes / InvSubBytes. The forward S-box and the inverse
// S-box are two fixed 256-entry look-up tables; inv_i selects which one
// drives the output (0 = encryption S-box, 1 = inverse S-box).
// Combinational.
//
// Holding both tables per byte and selecting with a multiplexer is this
// design's choice.
module sbox (
  input  logic       inv_i,
  input  logic [7:0] a_i,
  output logic [7:0] q_o
);
  logic [7:0] fwd, bwd;

  sbox_rom #(.TABLE(aes_pkg::TBL_SBOX))     u_fwd (.addr_i(a_i), .data_o(fwd));
  sbox_rom #(.TABLE(aes_pkg::TBL_INV_SBOX)) u_inv (.addr_i(a_i), .data_o(bwd));

  assign q_o = inv_i ? bwd : fwd;
endmodule
