// Shared types, constants and helper functions of the AES-256-GCM core.
//
// The package holds the pieces that several modules use: the 128-bit block
// type, the S-box implementation selector, the multiplier selector, the AES
// round transformations that need no S-box (ShiftRows, MixColumns), the
// AES-256 round constants and the GF(2^128) reduction used by GHASH.
//
// Byte and bit conventions follow the AES and GCM standards: byte 0 of a
// block is bits [127:120]; the AES state is filled column by column (byte k
// sits in row k%4, column k/4); in GHASH, bit 127 of a block is the
// coefficient of x^0 and bit 0 the coefficient of x^127.
package aes_gcm_pkg;

  typedef logic [127:0] block_t;
  typedef logic [255:0] key256_t;

  // Number of AES-256 rounds.
  localparam int unsigned AES_ROUNDS = 14;

  // S-box implementation: look-up table or composite-field arithmetic.
  typedef enum logic {SBOX_LUT = 1'b0, SBOX_CFA = 1'b1} sbox_impl_e;

  // GHASH multiplier: one product per cycle, or the 4-cycle Karatsuba unit.
  typedef enum logic {MULT_SINGLE = 1'b0, MULT_MULTI = 1'b1} mult_impl_e;

  // What an AES result leaving the GCTR unit is used for.
  typedef enum logic [1:0] {KS_HKEY = 2'd0, KS_J0 = 2'd1, KS_DATA = 2'd2} ks_kind_e;

  // Multiply by x in GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1.
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product (AES polynomial).
  function automatic logic [7:0] gf8_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, t;
    p = 8'h00;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // S-box value by definition: multiplicative inverse (a^254) then the
  // affine transform. Used only at elaboration to fill the S-box table.
  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] inv, sq, b;
    // a^254 = a^2 * a^4 * ... * a^128
    inv = 8'h01;
    sq  = a;
    for (int i = 1; i < 8; i++) begin
      sq  = gf8_mul(sq, sq);
      inv = gf8_mul(inv, sq);
    end
    for (int i = 0; i < 8; i++)
      b[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return b ^ 8'h63;
  endfunction

  // AES affine transform applied after inversion (used by the CFA S-box).
  function automatic logic [7:0] aes_affine(input logic [7:0] inv);
    logic [7:0] b;
    for (int i = 0; i < 8; i++)
      b[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return b ^ 8'h63;
  endfunction

  // Byte k of a block (byte 0 is the most significant).
  function automatic logic [7:0] get_byte(input block_t s, input int k);
    return s[127-8*k -: 8];
  endfunction

  // ShiftRows: row r is rotated left by r columns.
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(r+4*c) -: 8] = s[127-8*(r+4*((c+r)%4)) -: 8];
    return o;
  endfunction

  // MixColumns on all four columns.
  function automatic block_t mix_columns(input block_t s);
    block_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127-32*c -: 8];
      a1 = s[119-32*c -: 8];
      a2 = s[111-32*c -: 8];
      a3 = s[103-32*c -: 8];
      o[127-32*c -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[119-32*c -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[111-32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[103-32*c -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // Round constant for round key rk[2j] (j = 1..7): 01, 02, 04, ... 40.
  function automatic logic [7:0] rcon(input int unsigned j);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned i = 1; i < j; i++) r = xtime(r);
    return r;
  endfunction

  // Reduce a 255-bit carry-less product (bit i = coefficient of x^i)
  // modulo x^128 + x^7 + x^2 + x + 1.
  function automatic logic [127:0] gf128_reduce(input logic [254:0] c);
    logic [254:0] t;
    t = c;
    for (int i = 254; i >= 128; i--) begin
      if (t[i]) begin
        t[i]       = 1'b0;
        t[i-128]   ^= 1'b1;
        t[i-127]   ^= 1'b1;
        t[i-126]   ^= 1'b1;
        t[i-121]   ^= 1'b1;
      end
    end
    return t[127:0];
  endfunction

  // Bit reversal between GCM block order and polynomial order.
  function automatic logic [127:0] rev128(input logic [127:0] x);
    logic [127:0] y;
    for (int i = 0; i < 128; i++) y[i] = x[127-i];
    return y;
  endfunction

  // 32-bit increment of the rightmost word of a counter block (inc32).
  function automatic block_t inc32(input block_t cb);
    return {cb[127:32], cb[31:0] + 32'd1};
  endfunction

endpackage
