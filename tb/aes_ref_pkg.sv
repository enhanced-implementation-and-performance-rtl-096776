// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
//
// It is written independently of the RTL: the S-box is built by searching,
// for every byte, the byte whose GF(2^8) product with it is 1 (instead of
// exponentiation), and the affine map is applied bit by bit from the matrix
// rule b'[i] = b[i]^b[i+4]^b[i+5]^b[i+6]^b[i+7]^c[i]. The state is kept as a
// 4x4 byte matrix st[row][col] and the key schedule as the full list of 44
// words. Known-answer vectors are given as constants.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [31:0]  u32;
  typedef logic [127:0] u128;

  // FIPS-197 Appendix C.1
  localparam u128 FIPS_C1_KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam u128 FIPS_C1_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam u128 FIPS_C1_CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  // FIPS-197 Appendix B
  localparam u128 FIPS_B_KEY  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam u128 FIPS_B_PT   = 128'h3243f6a8885a308d313198a2e0370734;
  localparam u128 FIPS_B_CT   = 128'h3925841d02dc09fbdc118597196a0b32;
  // the single-block example of the design's own simulation run
  localparam u128 EX_KEY      = 128'h00000000000000000000000000000028;
  localparam u128 EX_PT       = 128'h0000000000000000000000000000001e;
  localparam u128 EX_CT       = 128'h0f616d50c446315ce92998849766cc2a;

  function automatic u8 mul(input u8 a, input u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic u8 sbox(input u8 x);
    u8 inv = 0;
    u8 c = 8'h63;
    u8 o;
    for (int v = 1; v < 256; v++)
      if (mul(x, u8'(v)) == 8'h01) inv = u8'(v);
    for (int i = 0; i < 8; i++)
      o[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
    return o;
  endfunction

  function automatic u32 mixcol(input u32 c);
    u8 a[4];
    u32 o;
    for (int r = 0; r < 4; r++) a[r] = c[31-8*r -: 8];
    for (int r = 0; r < 4; r++)
      o[31-8*r -: 8] = mul(a[r], 8'h02) ^ mul(a[(r+1)%4], 8'h03) ^ a[(r+2)%4] ^ a[(r+3)%4];
    return o;
  endfunction

  // round key k (0..10) of the expansion of key
  function automatic u128 round_key(input u128 key, input int k);
    u32 w[44];
    u32 t;
    u8  rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
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
    return {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
  endfunction

  typedef u8 mat_t [4][4];   // [row][col]

  function automatic mat_t to_mat(input u128 b);
    mat_t m;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) m[r][c] = b[127-8*(4*c+r) -: 8];
    return m;
  endfunction

  function automatic u128 from_mat(input mat_t m);
    u128 b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127-8*(4*c+r) -: 8] = m[r][c];
    return b;
  endfunction

  function automatic u128 shift_rows(input u128 b);
    mat_t m = to_mat(b);
    mat_t o;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) o[r][c] = m[r][(c+r)%4];
    return from_mat(o);
  endfunction

  function automatic u128 sub_bytes(input u128 b);
    for (int i = 0; i < 16; i++) b[8*i +: 8] = sbox(b[8*i +: 8]);
    return b;
  endfunction

  function automatic u128 mix_columns(input u128 b);
    for (int c = 0; c < 4; c++) b[127-32*c -: 32] = mixcol(b[127-32*c -: 32]);
    return b;
  endfunction

  function automatic u128 encrypt(input u128 pt, input u128 key);
    u128 s = pt ^ round_key(key, 0);
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r < 10) s = mix_columns(s);
      s ^= round_key(key, r);
    end
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
