// aria_pkg: types, constants and functions shared by the ARIA-128 cipher and the
// CTR-DRBG built on it.
//
// ARIA (Korean standard KS X 1213, RFC 5794) is a 128-bit SPN block cipher. A round
// XORs the round key, passes the 16 bytes through a substitution layer (SL1 on odd
// rounds, SL2 on even rounds) and mixes them with the involutive 16x16 binary
// diffusion matrix A. ARIA-128 runs 12 rounds with 13 round keys. Byte 0 is the most
// significant byte of a 128-bit word throughout.
//
// The four S-boxes are computed at elaboration from their algebraic definitions
// rather than stored (SBOX below):
//   SB1(x) = AES S-box: affine(x^-1) in GF(2^8) mod x^8+x^4+x^3+x+1
//   SB2(x) = B * x^247 ^ 0xE2, B an 8x8 bit matrix (columns in SB2_COL)
//   SB3 = SB1^-1, SB4 = SB2^-1 (built by inverting the first two tables).
// The cipher itself is fixed by the standard; the source description only names it.
package aria_pkg;

  typedef logic [127:0] blk_t;              // one 128-bit cipher block
  typedef logic [12:0][127:0] rkeys_t;       // 13 round keys, index 0 = ek1
  typedef logic [255:0] seed_t;              // seedlen = keylen + blocklen = 256

  localparam int unsigned NR = 12;           // rounds of ARIA-128

  // Key-schedule constants for a 128-bit key (CK1, CK2, CK3 = C1, C2, C3).
  localparam blk_t C1 = 128'h517cc1b727220a94fe13abe8fa9a6ee0;
  localparam blk_t C2 = 128'h6db14acc9e21c820ff28b1d5ef5de2b0;
  localparam blk_t C3 = 128'hdb92371d2126e9700324977504e8c90e;

  // Fixed derivation-function key: leftmost 128 bits of 0x00 01 02 ... 1F.
  localparam blk_t DF_KEY = 128'h000102030405060708090a0b0c0d0e0f;

  // Column j of the SB2 matrix B is the image of bit j.
  localparam logic [7:0][7:0] SB2_COL = {8'hee, 8'h85, 8'h5f, 8'h5b,
                                         8'hcf, 8'h12, 8'hc5, 8'hac};

  typedef logic [255:0][7:0] sbox_t;

  // All four S-boxes, computed once. GF(2^8) powers come from exp/log tables
  // over the generator 0x03: x^-1 = exp[255 - log x], x^247 = exp[247 log x mod 255].
  function automatic logic [3:0][255:0][7:0] build_sboxes();
    logic [3:0][255:0][7:0] t;
    logic [7:0] ex [256];
    int         lg [256];
    logic [7:0] a, b, y, r;
    a = 8'h01;
    for (int i = 0; i < 255; i++) begin
      ex[i] = a;
      lg[a] = i;
      a = a ^ {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);   // a * 0x03
    end
    ex[255] = 8'h01;
    lg[0]   = 0;
    for (int x = 0; x < 256; x++) begin
      // SB1: AES affine map of the inverse
      b = (x == 0) ? 8'h00 : ex[(255 - lg[x]) % 255];
      for (int i = 0; i < 8; i++)
        r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
      t[0][x] = r ^ 8'h63;
      // SB2: B * x^247 ^ 0xE2
      y = (x == 0) ? 8'h00 : ex[(247 * lg[x]) % 255];
      r = 8'he2;
      for (int j = 0; j < 8; j++)
        if (y[j]) r ^= SB2_COL[j];
      t[1][x] = r;
    end
    for (int x = 0; x < 256; x++) begin
      t[2][t[0][x]] = 8'(x);   // SB3 = SB1^-1
      t[3][t[1][x]] = 8'(x);   // SB4 = SB2^-1
    end
    return t;
  endfunction

  localparam logic [3:0][255:0][7:0] SBOX = build_sboxes();

  function automatic logic [7:0] byte_of(input blk_t x, input int i);
    return x[127-8*i -: 8];
  endfunction

  // Diffusion layer A: y_i is the XOR of the seven bytes listed in row i.
  function automatic blk_t diffuse(input blk_t x);
    logic [7:0] b [16];
    logic [7:0] y [16];
    blk_t r;
    for (int i = 0; i < 16; i++) b[i] = byte_of(x, i);
    y[0]  = b[3] ^ b[4] ^ b[6] ^ b[8]  ^ b[9]  ^ b[13] ^ b[14];
    y[1]  = b[2] ^ b[5] ^ b[7] ^ b[8]  ^ b[9]  ^ b[12] ^ b[15];
    y[2]  = b[1] ^ b[4] ^ b[6] ^ b[10] ^ b[11] ^ b[12] ^ b[15];
    y[3]  = b[0] ^ b[5] ^ b[7] ^ b[10] ^ b[11] ^ b[13] ^ b[14];
    y[4]  = b[0] ^ b[2] ^ b[5] ^ b[8]  ^ b[11] ^ b[14] ^ b[15];
    y[5]  = b[1] ^ b[3] ^ b[4] ^ b[9]  ^ b[10] ^ b[14] ^ b[15];
    y[6]  = b[0] ^ b[2] ^ b[7] ^ b[9]  ^ b[10] ^ b[12] ^ b[13];
    y[7]  = b[1] ^ b[3] ^ b[6] ^ b[8]  ^ b[11] ^ b[12] ^ b[13];
    y[8]  = b[0] ^ b[1] ^ b[4] ^ b[7]  ^ b[10] ^ b[13] ^ b[15];
    y[9]  = b[0] ^ b[1] ^ b[5] ^ b[6]  ^ b[11] ^ b[12] ^ b[14];
    y[10] = b[2] ^ b[3] ^ b[5] ^ b[6]  ^ b[8]  ^ b[13] ^ b[15];
    y[11] = b[2] ^ b[3] ^ b[4] ^ b[7]  ^ b[9]  ^ b[12] ^ b[14];
    y[12] = b[1] ^ b[2] ^ b[6] ^ b[7]  ^ b[9]  ^ b[11] ^ b[12];
    y[13] = b[0] ^ b[3] ^ b[6] ^ b[7]  ^ b[8]  ^ b[10] ^ b[13];
    y[14] = b[0] ^ b[3] ^ b[4] ^ b[5]  ^ b[9]  ^ b[11] ^ b[14];
    y[15] = b[1] ^ b[2] ^ b[4] ^ b[5]  ^ b[8]  ^ b[10] ^ b[15];
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = y[i];
    return r;
  endfunction

  function automatic blk_t rotr128(input blk_t x, input int n);
    return (x >> n) | (x << (128 - n));
  endfunction

  // Round keys of ARIA-128 from the four key-schedule words W0..W3.
  function automatic rkeys_t expand(input blk_t w0, input blk_t w1,
                                    input blk_t w2, input blk_t w3);
    rkeys_t ek;
    ek[0]  = w0 ^ rotr128(w1, 19);
    ek[1]  = w1 ^ rotr128(w2, 19);
    ek[2]  = w2 ^ rotr128(w3, 19);
    ek[3]  = w3 ^ rotr128(w0, 19);
    ek[4]  = w0 ^ rotr128(w1, 31);
    ek[5]  = w1 ^ rotr128(w2, 31);
    ek[6]  = w2 ^ rotr128(w3, 31);
    ek[7]  = w3 ^ rotr128(w0, 31);
    ek[8]  = w0 ^ rotr128(w1, 128 - 61);
    ek[9]  = w1 ^ rotr128(w2, 128 - 61);
    ek[10] = w2 ^ rotr128(w3, 128 - 61);
    ek[11] = w3 ^ rotr128(w0, 128 - 61);
    ek[12] = w0 ^ rotr128(w1, 128 - 31);
    return ek;
  endfunction

endpackage
