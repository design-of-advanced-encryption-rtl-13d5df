// InvMixColumns: each state column is multiplied in GF(2^8) by the circulant
// matrix with first row [0e 0b 0d 09], the inverse of MixColumns.
//
// For column (a0,a1,a2,a3) the new byte at row r is
// 0e*a[r] ^ 0b*a[r+1] ^ 0d*a[r+2] ^ 09*a[r+3] (rows mod 4). The constant
// products are built from x2 = 02*a, x4 = 04*a and x8 = 08*a. Combinational.
// Interface: 128-bit state in and out.
// Follows the AES InvMixColumns matrix; the way the constant products are
// formed is an implementation choice.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  // 09*a, 0b*a, 0d*a and 0e*a from the doublings of a.
  function automatic byte_t mul9(byte_t a);
    return xtime(xtime(xtime(a))) ^ a;
  endfunction
  function automatic byte_t mulb(byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(a) ^ a;
  endfunction
  function automatic byte_t muld(byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ a;
  endfunction
  function automatic byte_t mule(byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ xtime(a);
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        state_out[127 - 8*(r + 4*c) -: 8] =
            mule(get_byte(state_in, r, c)) ^
            mulb(get_byte(state_in, (r + 1) % 4, c)) ^
            muld(get_byte(state_in, (r + 2) % 4, c)) ^
            mul9(get_byte(state_in, (r + 3) % 4, c));
      end
  end

endmodule
