// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL: AES-128 with a fully expanded key schedule on byte arrays and an
// S-box built by searching for inverses; PRESENT-80 with all round keys
// generated first and the permutation written as P(i) = 16*(i mod 4) + i/4.
package tb_ref_pkg;

  // ---------------- AES-128 ----------------
  function automatic byte unsigned gmul(byte unsigned a, byte unsigned b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic byte unsigned ref_sbox(byte unsigned x);
    byte unsigned inv, r;
    logic [7:0] c;
    c = 8'h63;
    inv = 0;
    if (x != 0)
      for (int y = 1; y < 256; y++) if (gmul(x, byte'(y)) == 1) inv = byte'(y);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
    return r;
  endfunction

  byte unsigned sb_tab [256];
  bit           sb_ready = 0;

  function automatic void build_sbox();
    if (!sb_ready) begin
      for (int i = 0; i < 256; i++) sb_tab[i] = ref_sbox(byte'(i));
      sb_ready = 1;
    end
  endfunction

  function automatic logic [127:0] aes_ref(logic [127:0] key, logic [127:0] pt);
    byte unsigned w [176];
    byte unsigned s [16];
    byte unsigned t [16];
    byte unsigned rc;
    logic [127:0] out;
    build_sbox();
    for (int i = 0; i < 16; i++) w[i] = key[127 - 8*i -: 8];
    rc = 1;
    for (int i = 16; i < 176; i += 4) begin
      byte unsigned tmp [4];
      for (int j = 0; j < 4; j++) tmp[j] = w[i - 4 + j];
      if (i % 16 == 0) begin
        byte unsigned x;
        x = tmp[0];
        tmp[0] = sb_tab[tmp[1]] ^ rc; tmp[1] = sb_tab[tmp[2]];
        tmp[2] = sb_tab[tmp[3]];      tmp[3] = sb_tab[x];
        rc = gmul(rc, 2);
      end
      for (int j = 0; j < 4; j++) w[i + j] = w[i - 16 + j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sb_tab[s[i]];
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) t[4*c + row] = s[4*((c + row) % 4) + row];
      if (r != 10) begin
        for (int c = 0; c < 4; c++)
          for (int row = 0; row < 4; row++)
            s[4*c + row] = gmul(t[4*c + row], 2) ^ gmul(t[4*c + (row+1)%4], 3)
                         ^ t[4*c + (row+2)%4] ^ t[4*c + (row+3)%4];
      end else begin
        s = t;
      end
      for (int i = 0; i < 16; i++) s[i] ^= w[16*r + i];
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = s[i];
    return out;
  endfunction

  // ---------------- PRESENT-80 ----------------
  const bit [3:0] PS [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                              4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  function automatic logic [63:0] present_ref(logic [79:0] key, logic [63:0] pt);
    logic [63:0] rk [33];
    logic [79:0] k;
    logic [63:0] s, p;
    k = key;
    for (int i = 1; i <= 32; i++) begin
      rk[i] = k[79:16];
      k = {k[18:0], k[79:19]};
      k[79:76] = PS[k[79:76]];
      k[19:15] ^= 5'(i);
    end
    s = pt;
    for (int i = 1; i <= 31; i++) begin
      s ^= rk[i];
      for (int n = 0; n < 16; n++) s[4*n +: 4] = PS[s[4*n +: 4]];
      for (int b = 0; b < 64; b++) p[16*(b % 4) + b / 4] = s[b];
      s = p;
    end
    return s ^ rk[32];
  endfunction

endpackage
