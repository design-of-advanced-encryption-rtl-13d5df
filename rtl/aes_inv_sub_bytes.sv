// InvSubBytes: the byte substitution of an AES decryption round.
//
// Each of the 16 state bytes goes through its own inverse S-box
// (aes_inv_sbox), in one combinational step. Interface: a 128-bit state in, a
// 128-bit state out, no clock.
// Follows the AES InvSubBytes step; one inverse S-box per byte is this
// design's choice.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_inv_sbox u_inv_sbox (
      .in_byte (state_in[127 - 8*i -: 8]),
      .out_byte(state_out[127 - 8*i -: 8])
    );
  end

endmodule
