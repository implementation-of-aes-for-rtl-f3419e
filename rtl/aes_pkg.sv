// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128
// encryption datapath.
//
// The state of a block is held as a 128-bit vector in the byte order of the
// AES standard: byte k = row + 4*column sits at bits [127-8k -: 8], so column c
// is the 32-bit word at bits [127-32c -: 32] with row 0 in its top byte. The
// core moves data as these 32-bit columns ("packets"), four per block.
//
// The S-box table is not pasted in as numbers: it is computed at elaboration
// from its definition, the multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 (zero maps to zero) followed by the affine transform
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  localparam int unsigned NB     = 4;   // columns per state (32-bit packets)
  localparam int unsigned NK     = 4;   // key words for AES-128
  localparam int unsigned NR     = 10;  // rounds for AES-128
  localparam int unsigned NWORDS = NB * (NR + 1);  // 44 expanded-key words

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiply in GF(2^8), shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (zero maps to zero).
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);  // 254 = 0b1111_1110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // One S-box entry from its definition.
  function automatic byte_t sbox_calc(byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // The whole 256x8 table, entry i at [i].
  typedef logic [255:0][7:0] sbox_table_t;

  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  // Byte at (row, col) of a state vector.
  function automatic byte_t get_byte(block_t s, int unsigned row, int unsigned col);
    return s[127 - 8 * (row + 4 * col) -: 8];
  endfunction

  // Column col of the state after ShiftRows: row r is taken from column
  // (col + r) mod 4, i.e. row r is rotated left by r bytes.
  function automatic word_t shifted_column(block_t s, int unsigned col);
    word_t w;
    for (int r = 0; r < 4; r++) w[31 - 8 * r -: 8] = get_byte(s, r, (col + r) % 4);
    return w;
  endfunction

endpackage
