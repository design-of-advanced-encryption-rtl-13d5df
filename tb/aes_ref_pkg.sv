// Reference model of AES-128 for the testbenches, written independently of
// the RTL: the S-box is generated by walking the multiplicative group with
// generator 03 (a table, not the RTL's inverse-by-exponentiation), the state is
// handled as a byte array, and GF(2^8) products use a bit-serial multiply.
// The package also holds the pass/fail counters shared by a testbench.
package aes_ref_pkg;

  typedef logic [7:0] b8_t;
  typedef b8_t arr_t [16];

  int checks = 0;
  int failures = 0;

  b8_t sbox_t [256];
  b8_t isbox_t [256];
  bit  ready = 0;

  function automatic b8_t rotl8(b8_t x, int n);
    return b8_t'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void build();
    b8_t p = 1, q = 1, x;
    if (ready) return;
    do begin
      p = p ^ (p << 1) ^ ((p & 8'h80) != 0 ? 8'h1b : 8'h00);   // p *= 3
      q ^= q << 1; q ^= q << 2; q ^= q << 4;                     // q /= 3
      if ((q & 8'h80) != 0) q ^= 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      sbox_t[p] = x ^ 8'h63;
    end while (p != 1);
    sbox_t[0] = 8'h63;
    for (int i = 0; i < 256; i++) isbox_t[sbox_t[i]] = b8_t'(i);
    ready = 1;
  endfunction

  function automatic b8_t sbox(b8_t a);
    build();
    return sbox_t[a];
  endfunction

  function automatic b8_t isbox(b8_t a);
    build();
    return isbox_t[a];
  endfunction

  function automatic b8_t mul(b8_t a, b8_t b);
    b8_t r = 0;
    while (b != 0) begin
      if (b[0]) r ^= a;
      a = (a[7]) ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic arr_t to_arr(logic [127:0] v);
    arr_t a;
    for (int i = 0; i < 16; i++) a[i] = v[127 - 8*i -: 8];
    return a;
  endfunction

  function automatic logic [127:0] to_vec(arr_t a);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = a[i];
    return v;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] v, bit inv);
    arr_t a = to_arr(v);
    foreach (a[i]) a[i] = inv ? isbox(a[i]) : sbox(a[i]);
    return to_vec(a);
  endfunction

  // Forward: row r rotates left by r. Inverse: right by r.
  function automatic logic [127:0] shift_rows(logic [127:0] v, bit inv);
    arr_t a = to_arr(v), o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[4*c + r] = a[4*((c + r) & 3) + r];
        else      o[4*((c + r) & 3) + r] = a[4*c + r];
    return to_vec(o);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] v, bit inv);
    arr_t a = to_arr(v), o;
    b8_t m [4];
    if (inv) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b8_t acc = 0;
        for (int k = 0; k < 4; k++) acc ^= mul(m[(k - r + 4) & 3], a[4*c + k]);
        o[4*c + r] = acc;
      end
    return to_vec(o);
  endfunction

  // Round keys 0..10 of a 128-bit key, by words w[0..43].
  function automatic void expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    b8_t rc = 1;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int k = 0; k < 11; k++) rk[k] = {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
  endfunction

  function automatic logic [127:0] enc_round(logic [127:0] s, logic [127:0] k, bit last);
    s = shift_rows(sub_bytes(s, 0), 0);
    if (!last) s = mix_columns(s, 0);
    return s ^ k;
  endfunction

  function automatic logic [127:0] dec_round(logic [127:0] s, logic [127:0] k, bit last);
    s = sub_bytes(shift_rows(s, 1), 1) ^ k;
    if (!last) s = mix_columns(s, 1);
    return s;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = enc_round(s, rk[r], r == 10);
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) s = dec_round(s, rk[r], r == 0);
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic void check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endfunction

  function automatic void report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

endpackage
