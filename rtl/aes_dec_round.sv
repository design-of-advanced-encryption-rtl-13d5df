// One AES decryption round of the inverse cipher: InvShiftRows, InvSubBytes,
// AddRoundKey, InvMixColumns.
//
// When `last` is high the InvMixColumns step is bypassed, which gives the
// final round that ends with round key 0. The AddRoundKey with the last round
// key that precedes the first inverse round is applied by the decryption core.
// Combinational.
// Uses the standard inverse-cipher order; combinational, like the encryption
// round.
module aes_dec_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   last,
  output block_t state_out
);

  block_t shift_out, sub_out, key_out, mix_out;

  aes_inv_shift_rows  u_shift (.state_in(state_in),  .state_out(shift_out));
  aes_inv_sub_bytes   u_sub   (.state_in(shift_out), .state_out(sub_out));
  aes_add_round_key   u_ark   (.state_in(sub_out), .round_key(round_key), .state_out(key_out));
  aes_inv_mix_columns u_mix   (.state_in(key_out),   .state_out(mix_out));

  assign state_out = last ? key_out : mix_out;

endmodule
