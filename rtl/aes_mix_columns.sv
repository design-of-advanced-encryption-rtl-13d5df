// MixColumns: each state column is multiplied in GF(2^8) by the circulant
// matrix with first row [02 03 01 01].
//
// For column (a0,a1,a2,a3) the new byte at row r is
// 02*a[r] ^ 03*a[r+1] ^ a[r+2] ^ a[r+3] (rows mod 4); 02*x is xtime(x) and
// 03*x is xtime(x)^x, so no general multiplier is needed. Combinational.
// Interface: 128-bit state in and out.
// Follows the AES MixColumns step; the xtime decomposition is an
// implementation choice.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        byte_t a0, a1, a2, a3;
        a0 = get_byte(state_in, r, c);
        a1 = get_byte(state_in, (r + 1) % 4, c);
        a2 = get_byte(state_in, (r + 2) % 4, c);
        a3 = get_byte(state_in, (r + 3) % 4, c);
        state_out[127 - 8*(r + 4*c) -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      end
  end

endmodule
