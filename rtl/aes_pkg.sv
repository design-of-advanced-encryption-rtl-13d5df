// Shared types, constants and GF(2^8) arithmetic for the AES-128 engine.
//
// The 128-bit state is held as one packed vector. Byte 0 is bits [127:120];
// the bytes fill the 4x4 state matrix column by column, so row r of column c
// is byte r+4c. This is the byte order of the AES standard.
// Arithmetic is in GF(2^8) with the reduction polynomial x^8+x^4+x^3+x+1
// (0x11b). All functions are combinational and synthesizable.
// The field, the round count and the byte order are those of AES-128; the
// packed-vector representation is this design's choice.
package aes_pkg;

  localparam int unsigned NR = 10;  // rounds for a 128-bit key

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  // Round keys 0..NR, index k holds the key of round k.
  typedef logic [NR:0][127:0] round_keys_t;

  // Byte at row r, column c of a state.
  function automatic byte_t get_byte(block_t s, int unsigned r, int unsigned c);
    return s[127 - 8*(r + 4*c) -: 8];
  endfunction

  // Multiply by x (02) in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiply in GF(2^8), shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t acc = '0;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= t;
      t = xtime(t);
    end
    return acc;
  endfunction

  // Multiplicative inverse a^254 (0 maps to 0).
  function automatic byte_t gf_inv(byte_t a);
    byte_t sq = a;
    byte_t acc = 8'h01;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);        // a^(2^i)
      acc = gf_mul(acc, sq);
    end
    return acc;
  endfunction

  // Round constant of key-expansion round i (1..10): x^(i-1).
  function automatic byte_t rcon(int unsigned i);
    byte_t r = 8'h01;
    for (int k = 1; k < 11; k++)
      if (k < i) r = xtime(r);
    return r;
  endfunction

endpackage
