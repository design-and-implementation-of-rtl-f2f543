// AES-128 key schedule, one round key per clock.
//
// Round key 0 is the cipher key. Round key i (1..10) is made from round key
// i-1, seen as four 32-bit words w0..w3:
//   t   = SubWord(RotWord(w3)) ^ {rcon_i, 00, 00, 00}
//   w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// with rcon_1 = 01 and rcon_(i+1) = 02 * rcon_i in GF(2^8). SubWord uses four
// forward S-boxes. All eleven keys are kept in registers so that the cipher
// can read them in ascending order and the inverse cipher in descending order.
//
// Interface: a start_i pulse loads key_i; busy_o is high for the following
// 10 clocks while keys 1..10 are computed; valid_o rises together with the
// fall of busy_o and stays high until the next start_i. round_keys_o[i] is
// round key i. Reset (active low, synchronous) clears valid_o and busy_o.
//
// The key schedule is the FIPS-197 one for 128-bit keys; one key per clock
// and storing all eleven are this design's choices.
module key_expansion
  import aes_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start_i,
  input  block_t              key_i,
  output logic                busy_o,
  output logic                valid_o,
  output block_t [NR:0]       round_keys_o
);
  block_t      cur;          // most recent round key
  byte_t       rcon;
  logic [3:0]  idx;          // index of the key computed this clock
  logic [31:0] rot, sub, t, w0, w1, w2, w3;
  block_t      nxt;

  assign rot = {cur[23:0], cur[31:24]};  // RotWord of w3 = cur[31:0]

  for (genvar b = 0; b < 4; b++) begin : g_subword
    sbox u_sbox (.inv_i(1'b0), .a_i(rot[8*b +: 8]), .q_o(sub[8*b +: 8]));
  end

  always_comb begin
    t   = sub ^ {rcon, 24'h0};
    w0  = cur[127:96] ^ t;
    w1  = cur[95:64]  ^ w0;
    w2  = cur[63:32]  ^ w1;
    w3  = cur[31:0]   ^ w2;
    nxt = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_o  <= 1'b0;
      valid_o <= 1'b0;
      idx     <= '0;
      rcon    <= 8'h01;
      cur     <= '0;
    end else if (start_i) begin
      busy_o          <= 1'b1;
      valid_o         <= 1'b0;
      idx             <= 4'd1;
      rcon            <= 8'h01;
      cur             <= key_i;
      round_keys_o[0] <= key_i;
    end else if (busy_o) begin
      round_keys_o[idx] <= nxt;
      cur               <= nxt;
      rcon              <= xtime(rcon);
      idx               <= idx + 4'd1;
      if (idx == 4'(NR)) begin
        busy_o  <= 1'b0;
        valid_o <= 1'b1;
      end
    end
  end
endmodule
