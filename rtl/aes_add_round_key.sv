// AddRoundKey: bitwise XOR of the 128-bit state with a 128-bit round key.
//
// Used before the first encryption round, at the end of every round, and in
// the same places of the inverse cipher. Combinational.
// Follows the AES AddRoundKey step exactly.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
