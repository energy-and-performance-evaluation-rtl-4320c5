// aes_pkg: arithmetic of AES (FIPS-197) as combinational functions. The S-box
// is computed rather than tabulated: S(x) = A(x^254) ^ 0x63, where x^254 is the
// multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (0 maps to 0) and
// A(b) = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4).
// A 128-bit state holds byte 0 in bits [127:120]; byte i is row i%4, column i/4.
// These are the standard AES operations; computing the S-box instead of storing
// it is this design's choice.
package aes_pkg;

  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    logic [7:0] x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic logic [7:0] gf_sq(logic [7:0] a);
    return gf_mul(a, a);
  endfunction

  // a^254 by an addition chain: 2,3,6,7,14,15,30,31,62,63,126,127,254.
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] t;
    t = gf_mul(gf_sq(a), a);          // a^3
    t = gf_mul(gf_sq(t), a);          // a^7
    t = gf_mul(gf_sq(t), a);          // a^15
    t = gf_mul(gf_sq(t), a);          // a^31
    t = gf_mul(gf_sq(t), a);          // a^63
    t = gf_mul(gf_sq(t), a);          // a^127
    return gf_sq(t);                  // a^254
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] b;
    b = gf_inv(x);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] get_byte(logic [127:0] s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = sbox(get_byte(s, i));
    return r;
  endfunction

  // Row r of the state is rotated left by r columns.
  function automatic logic [127:0] shift_rows(logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int w = 0; w < 4; w++)
        r[127 - 8*(4*c + w) -: 8] = get_byte(s, 4*((c + w) % 4) + w);
    return r;
  endfunction

  function automatic logic [31:0] mix_column(logic [31:0] col);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return r;
  endfunction

  function automatic logic [31:0] sub_word(logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // Next AES-128 round key from the current one and the round constant.
  function automatic logic [127:0] next_round_key(logic [127:0] k, logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = sub_word({w3[23:0], w3[31:24]}) ^ {rcon, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
