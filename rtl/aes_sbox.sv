// AES S-box for one byte, computed rather than stored.
//
// out = A * inv(in) + 0x63, where inv is the multiplicative inverse in
// GF(2^8) (0 maps to 0) and A is the AES affine matrix: bit i of the result is
// b[i] ^ b[i+4] ^ b[i+5] ^ b[i+6] ^ b[i+7] ^ c[i] with indices mod 8 and
// c = 0x63. Purely combinational. Computing the table keeps the design free of
// a 256-entry constant; synthesis folds it into logic or a ROM either way.
// The substitution itself is AES's; computing it instead of storing a table
// is this design's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  byte_t inv;

  always_comb begin
    inv = gf_inv(in_byte);
    for (int i = 0; i < 8; i++)
      out_byte[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^
                    inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    out_byte = out_byte ^ 8'h63;
  end

endmodule
