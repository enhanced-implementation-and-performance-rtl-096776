// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128
// encryptor. The state is a 128-bit vector in FIPS-197 byte order: byte 0
// sits in bits 127:120 and column c is the 32-bit word at bits 127-32c -: 32,
// row 0 of a column in its top byte.
//
// The S-box table is not stored as a list of numbers. build_sbox_table()
// computes it at elaboration from its definition: the multiplicative inverse
// in GF(2^8) (x^254, modulo x^8+x^4+x^3+x+1) followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63. The result is a
// 256 x 8 constant that the S-box module reads as a look-up table.
package aes_pkg;

  localparam int unsigned AES128_NR = 10;  // rounds of AES-128
  localparam int unsigned NB       = 4;    // 32-bit columns per block
  localparam int unsigned WORD_W   = 32;
  localparam int unsigned BLOCK_W  = 128;

  typedef logic [7:0]           byte_t;
  typedef logic [WORD_W-1:0]    word_t;
  typedef logic [BLOCK_W-1:0]   block_t;
  typedef word_t [NB-1:0]       words_t;     // index 3 = column 0 (top word)
  typedef byte_t [255:0]        sbox_table_t;

  // multiply by x (xtime) in GF(2^8)
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // general GF(2^8) product, shift-and-add
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t acc = 8'h00;
    byte_t p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // inverse as a^254 (square-and-multiply); 0 maps to 0
  function automatic byte_t gf_inv(input byte_t a);
    byte_t r  = 8'h01;
    byte_t sq = a;
    for (int i = 1; i < 8; i++) begin   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t b, input int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(input byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic sbox_table_t build_sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  // ShiftRows as a byte permutation: output byte i takes input byte
  // (i + 4*(i mod 4)) mod 16, byte 0 being bits 127:120.
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int i = 0; i < 16; i++)
      o[127-8*i -: 8] = s[127-8*((i + 4*(i % 4)) % 16) -: 8];
    return o;
  endfunction

endpackage
