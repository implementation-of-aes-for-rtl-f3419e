// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
//
// Written independently of the RTL helpers: the S-box is built from
// logarithm/antilogarithm tables over the generator 0x03 and a bitwise affine
// transform, the cipher works on a 16-byte array (byte k = row + 4*column,
// byte 0 in bits [127:120] of a block), and the key schedule is the textbook
// loop over 44 words. Known-answer vectors of the AES standard are used by
// the testbenches to check this model too.
package aes_ref_pkg;

  logic [7:0] sbox_tab [256];
  bit         sbox_ready = 0;

  function automatic logic [7:0] mul2(logic [7:0] a);
    logic [8:0] t = {a, 1'b0};
    if (t[8]) t = t ^ 9'h11b;
    return t[7:0];
  endfunction

  function automatic void build_sbox();
    int unsigned expt [255];
    int unsigned logt [256];
    logic [7:0] e = 8'h01;
    for (int i = 0; i < 255; i++) begin
      expt[i] = e;
      logt[e] = i;
      e = e ^ mul2(e);                 // times 0x03
    end
    for (int a = 0; a < 256; a++) begin
      logic [7:0] inv, s;
      inv = (a == 0) ? 8'h00 : 8'(expt[(255 - logt[a]) % 255]);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8]
             ^ inv[(i + 7) % 8] ^ ((8'h63 >> i) & 1);
      sbox_tab[a] = s;
    end
    sbox_ready = 1;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    if (!sbox_ready) build_sbox();
    return sbox_tab[a];
  endfunction

  function automatic logic [31:0] sub_word(logic [31:0] x);
    return {sbox(x[31:24]), sbox(x[23:16]), sbox(x[15:8]), sbox(x[7:0])};
  endfunction

  function automatic logic [31:0] mix_col(logic [31:0] c);
    logic [7:0] a0 = c[31:24], a1 = c[23:16], a2 = c[15:8], a3 = c[7:0];
    return {mul2(a0) ^ mul2(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ mul2(a1) ^ mul2(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ mul2(a2) ^ mul2(a3) ^ a3,
            mul2(a0) ^ a0 ^ a1 ^ a2 ^ mul2(a3)};
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] s);
    logic [7:0] b [16];
    logic [7:0] o [16];
    logic [127:0] r;
    for (int k = 0; k < 16; k++) b[k] = s[127 - 8 * k -: 8];
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        o[row + 4 * c] = b[row + 4 * ((c + row) % 4)];
    for (int k = 0; k < 16; k++) r[127 - 8 * k -: 8] = o[k];
    return r;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    logic [127:0] r;
    for (int k = 0; k < 16; k++) r[8 * k +: 8] = sbox(s[8 * k +: 8]);
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++) r[127 - 32 * c -: 32] = mix_col(s[127 - 32 * c -: 32]);
    return r;
  endfunction

  // 44-word key schedule; word i returned at [i].
  typedef logic [31:0] words_t [44];

  function automatic words_t expand_key(logic [127:0] key);
    words_t w;
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32 * i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i - 1];
      if (i % 4 == 0) begin
        t = sub_word({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = mul2(rc);
      end
      w[i] = w[i - 4] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] round_key(words_t w, int r);
    return {w[4 * r], w[4 * r + 1], w[4 * r + 2], w[4 * r + 3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    words_t w = expand_key(key);
    logic [127:0] s = pt ^ round_key(w, 0);
    for (int r = 1; r < 10; r++) s = mix_columns(sub_bytes(shift_rows(s))) ^ round_key(w, r);
    return sub_bytes(shift_rows(s)) ^ round_key(w, 10);
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
