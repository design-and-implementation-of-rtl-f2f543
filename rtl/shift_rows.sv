// ShiftRows / InvShiftRows. Row N of the 4x4 state (N = 1..4) is rotated
// cyclically by N-1 byte positions: to the left for encryption (inv_i = 0),
// to the right for decryption (inv_i = 1). Row 1 is unchanged. Only wiring
// and a 2:1 multiplexer per byte; combinational.
//
// The rotation rule is the method's; merging both directions into one unit
// with a select input is this design's choice.
module shift_rows
  import aes_pkg::*;
(
  input  logic   inv_i,
  input  block_t state_i,
  output block_t state_o
);
  always_comb begin
    state_o = '0;
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        // Left rotation by r: new column c takes old column c + r.
        // Right rotation by r: new column c takes old column c - r.
        state_o = with_byte(state_o, r, c,
                            inv_i ? state_byte(state_i, r, (c + 4 - r) % 4)
                                  : state_byte(state_i, r, (c + r) % 4));
      end
    end
  end
endmodule
