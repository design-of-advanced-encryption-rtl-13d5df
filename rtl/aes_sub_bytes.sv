// SubBytes: the non-linear byte substitution of an AES encryption round.
//
// Each of the 16 state bytes goes through its own S-box (aes_sbox), so the
// whole state is substituted in one combinational step. Interface: a 128-bit
// state in, a 128-bit state out, no clock.
// Follows the AES SubBytes step; one S-box per byte (fully parallel) is this
// design's choice.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox u_sbox (
      .in_byte (state_in[127 - 8*i -: 8]),
      .out_byte(state_out[127 - 8*i -: 8])
    );
  end

endmodule
