// One AES encryption round: SubBytes, ShiftRows, MixColumns, AddRoundKey.
//
// When `last` is high the MixColumns step is bypassed, which gives the final
// (tenth) round of the cipher. The initial AddRoundKey that precedes round 1
// is not part of this block; the encryption core applies it. Combinational:
// state_out follows state_in, round_key and last within the same cycle.
// The step order and the last-round rule follow AES; making the round purely
// combinational is this design's choice.
module aes_enc_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   last,
  output block_t state_out
);

  block_t sub_out, shift_out, mix_out, pre_key;

  aes_sub_bytes   u_sub   (.state_in(state_in),  .state_out(sub_out));
  aes_shift_rows  u_shift (.state_in(sub_out),   .state_out(shift_out));
  aes_mix_columns u_mix   (.state_in(shift_out), .state_out(mix_out));

  assign pre_key = last ? shift_out : mix_out;

  aes_add_round_key u_ark (.state_in(pre_key), .round_key(round_key), .state_out(state_out));

endmodule
