// Iterative AES-128 cipher and inverse cipher, one round per clock.
//
// A single round datapath is reused for all ten rounds. The state register
// holds the 4x4 byte matrix between rounds. Per clock:
//   encryption, round r = 1..10:
//     state <= AddRoundKey(MixColumns(ShiftRows(SubBytes(state))), K_r)
//     (MixColumns skipped in round 10)
//   decryption, round r = 9..0 (inverse cipher of FIPS-197):
//     state <= InvMixColumns(AddRoundKey(InvSubBytes(InvShiftRows(state)), K_r))
//     (InvMixColumns skipped in round 0)
// The initial AddRoundKey (K_0 for encryption, K_10 for decryption) is done
// as the block is loaded. SubBytes and ShiftRows act on single bytes and on
// byte positions, so they commute and one pair of units serves both
// directions. One MixColumns unit, with its inverse selected by the mode,
// sits before the key addition for encryption and after it for decryption.
// MIX_IMPL chooses the MixColumns circuit: shifts and XORs, or log/antilog
// tables; both give identical results.
//
// Interface: key_valid_i/key_ready_o load a new cipher key; the key schedule
// then runs for 10 clocks. Blocks use valid/ready handshakes on the input
// (in_decrypt_i = 1 selects decryption) and on the output. Timing: a block
// accepted at clock edge 0 appears on out_block_o with out_valid_o high after
// edge 10 (10 clocks latency, one per round) and is held until out_ready_i.
// A new block is accepted in the clock after the result has been taken, so
// the rate is one block per 12 clocks when the output is never stalled. Keys can be changed only while
// no block is in flight. Reset is synchronous and active low.
//
// The four steps and their inverses are the method's; the round order is
// FIPS-197's; the iterative one-round-per-clock structure, the handshakes and
// the synchronous reset are this design's choices.
module aes_core
  import aes_pkg::*;
#(
  parameter mix_impl_e MIX_IMPL = MIX_ADD_SHIFT
) (
  input  logic   clk,
  input  logic   rst_n,
  // key load
  input  logic   key_valid_i,
  output logic   key_ready_o,
  input  block_t key_i,
  // block input
  input  logic   in_valid_i,
  output logic   in_ready_o,
  input  logic   in_decrypt_i,
  input  block_t in_block_i,
  // block output
  output logic   out_valid_o,
  input  logic   out_ready_i,
  output logic   out_decrypt_o,
  output block_t out_block_o
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} fsm_e;

  fsm_e        fsm;
  block_t      state;
  logic        dec;
  logic [3:0]  rnd;

  logic        kx_busy, kx_valid;
  block_t [NR:0] rk;

  assign key_ready_o = (fsm == S_IDLE) && !kx_busy;
  assign in_ready_o  = (fsm == S_IDLE) && !kx_busy && kx_valid && !key_valid_i;

  key_expansion u_kx (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (key_valid_i && key_ready_o),
    .key_i        (key_i),
    .busy_o       (kx_busy),
    .valid_o      (kx_valid),
    .round_keys_o (rk)
  );

  // ---------------- round datapath ----------------
  block_t sb_out, sr_out, mc_in, mc_out, ark_in, round_out;
  logic   last;

  assign last = dec ? (rnd == 4'd0) : (rnd == 4'(NR));

  sub_bytes  u_sb (.inv_i(dec), .state_i(state),  .state_o(sb_out));
  shift_rows u_sr (.inv_i(dec), .state_i(sb_out), .state_o(sr_out));

  // Encryption: MixColumns then AddRoundKey. Decryption: the reverse. Two
  // key adders keep the two orders apart, so there is no combinational path
  // from the MixColumns output back to its input.
  block_t ark_dec, ark_enc;

  add_round_key u_ark_dec (.state_i(sr_out), .round_key_i(rk[rnd]), .state_o(ark_dec));

  assign mc_in = dec ? ark_dec : sr_out;

  if (MIX_IMPL == MIX_LUT) begin : g_mix_lut
    mix_columns_lut u_mc (.inv_i(dec), .state_i(mc_in), .state_o(mc_out));
  end else begin : g_mix_as
    mix_columns_add_shift u_mc (.inv_i(dec), .state_i(mc_in), .state_o(mc_out));
  end

  assign ark_in = last ? sr_out : mc_out;

  add_round_key u_ark_enc (.state_i(ark_in), .round_key_i(rk[rnd]), .state_o(ark_enc));

  assign round_out = dec ? (last ? ark_dec : mc_out) : ark_enc;

  // ---------------- control ----------------
  block_t first_key;
  assign first_key = in_decrypt_i ? rk[NR] : rk[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm   <= S_IDLE;
      state <= '0;
      dec   <= 1'b0;
      rnd   <= '0;
    end else begin
      unique case (fsm)
        S_IDLE: if (in_valid_i && in_ready_o) begin
          state <= in_block_i ^ first_key;
          dec   <= in_decrypt_i;
          rnd   <= in_decrypt_i ? 4'(NR - 1) : 4'd1;
          fsm   <= S_RUN;
        end
        S_RUN: begin
          state <= round_out;
          if (last) fsm <= S_DONE;
          else      rnd <= dec ? rnd - 4'd1 : rnd + 4'd1;
        end
        S_DONE: if (out_ready_i) fsm <= S_IDLE;
        default: fsm <= S_IDLE;
      endcase
    end
  end

  assign out_valid_o   = (fsm == S_DONE);
  assign out_block_o   = state;
  assign out_decrypt_o = dec;

  // A result offered and not taken stays unchanged.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid_o && !out_ready_i |=> out_valid_o && $stable(out_block_o));
endmodule
