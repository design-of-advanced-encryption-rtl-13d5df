// AES inverse S-box for one byte, computed rather than stored.
//
// Undoes aes_sbox: first the inverse affine transform, bit i of
// t = in[i+2] ^ in[i+5] ^ in[i+7] ^ d[i] (indices mod 8, d = 0x05), then the
// multiplicative inverse in GF(2^8). Purely combinational.
// The substitution is AES's inverse S-box; computing it is this design's
// choice.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  byte_t t;

  always_comb begin
    for (int i = 0; i < 8; i++)
      t[i] = in_byte[(i + 2) % 8] ^ in_byte[(i + 5) % 8] ^ in_byte[(i + 7) % 8];
    t = t ^ 8'h05;
    out_byte = gf_inv(t);
  end

endmodule
