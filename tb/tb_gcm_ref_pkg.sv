// Reference model of AES-256 and AES-256-GCM for the testbenches.
//
// Written independently of the RTL and in a different style: byte-array AES
// state, the S-box computed from exponential/logarithm tables of generator 3
// with the affine map written as rotations, the 60-word AES-256 key schedule
// of the standard, and the bit-serial GF(2^128) multiplication of the GCM
// specification (shift right, reduce with 0xE1 || 0^120). Messages are byte
// queues. Simulation only.
package tb_gcm_ref_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic byte unsigned rotl8(byte unsigned x, int n);
    return byte'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic byte unsigned ref_sbox(byte unsigned x);
    byte unsigned e [256];
    int           l [256];
    byte unsigned v, inv;
    v = 1;
    for (int i = 0; i < 255; i++) begin
      e[i] = v;
      l[v] = i;
      v = v ^ byte'((v << 1) ^ (((v & 8'h80) != 0) ? 8'h1b : 8'h00));   // v * 3
    end
    inv = (x == 0) ? 8'h00 : e[(255 - l[x]) % 255];
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic byte unsigned xt(byte unsigned b);
    return byte'((b << 1) ^ (((b & 8'h80) != 0) ? 8'h1b : 8'h00));
  endfunction

  // Round key i (0..14) of the AES-256 key schedule
  function automatic logic [127:0] ref_round_key(logic [255:0] key, int idx);
    logic [31:0]  w [60];
    logic [31:0]  t;
    byte unsigned rc;
    for (int i = 0; i < 8; i++) w[i] = key[255 - 32*i -: 32];
    rc = 8'h01;
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = xt(rc);
      end else if (i % 8 == 4) begin
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
      end
      w[i] = w[i-8] ^ t;
    end
    return {w[4*idx], w[4*idx+1], w[4*idx+2], w[4*idx+3]};
  endfunction

  function automatic logic [127:0] ref_aes256(logic [255:0] key, logic [127:0] pt);
    logic [31:0]  w [60];
    logic [31:0]  t;
    byte unsigned s [16], u [16], sb [256];
    byte unsigned rc;
    logic [127:0] out;
    for (int i = 0; i < 256; i++) sb[i] = ref_sbox(byte'(i));
    for (int i = 0; i < 8; i++) w[i] = key[255 - 32*i -: 32];
    rc = 8'h01;
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        t[31:24] ^= rc;
        rc = xt(rc);
      end else if (i % 8 == 4) begin
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
      end
      w[i] = w[i-8] ^ t;
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8] ^ w[i/4][31 - 8*(i%4) -: 8];
    for (int r = 1; r <= 14; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sb[s[i]];
      // ShiftRows: byte (row, col) at index row + 4*col
      for (int c = 0; c < 4; c++)
        for (int rr = 0; rr < 4; rr++) u[rr + 4*c] = s[rr + 4*((c + rr) % 4)];
      if (r != 14) begin
        for (int c = 0; c < 4; c++) begin
          s[4*c]   = xt(u[4*c]) ^ xt(u[4*c+1]) ^ u[4*c+1] ^ u[4*c+2] ^ u[4*c+3];
          s[4*c+1] = u[4*c] ^ xt(u[4*c+1]) ^ xt(u[4*c+2]) ^ u[4*c+2] ^ u[4*c+3];
          s[4*c+2] = u[4*c] ^ u[4*c+1] ^ xt(u[4*c+2]) ^ xt(u[4*c+3]) ^ u[4*c+3];
          s[4*c+3] = xt(u[4*c]) ^ u[4*c] ^ u[4*c+1] ^ u[4*c+2] ^ xt(u[4*c+3]);
        end
      end else begin
        s = u;
      end
      for (int i = 0; i < 16; i++) s[i] ^= w[4*r + i/4][31 - 8*(i%4) -: 8];
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = s[i];
    return out;
  endfunction

  // GCM product, bit-serial as in the GCM specification
  function automatic logic [127:0] ref_gmul(logic [127:0] x, logic [127:0] y);
    logic [127:0] z, v;
    z = '0;
    v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127 - i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'he1, 120'h0}) : (v >> 1);
    end
    return z;
  endfunction

  function automatic logic [127:0] blk_of(bytes_t q, int first);
    logic [127:0] b;
    b = '0;
    for (int i = 0; i < 16; i++)
      if (first + i < q.size()) b[127 - 8*i -: 8] = q[first + i];
    return b;
  endfunction

  // AES-256-GCM encryption with a 96-bit IV
  task automatic ref_gcm(input logic [255:0] key, input logic [95:0] iv, input bytes_t a,
                         input bytes_t p, output bytes_t c, output logic [127:0] tag);
    logic [127:0] h, y, ks, cb;
    bytes_t cq;
    h  = ref_aes256(key, '0);
    y  = '0;
    cq = {};
    cb = {iv, 32'd1};
    for (int i = 0; i < p.size(); i += 16) begin
      cb = {cb[127:32], cb[31:0] + 32'd1};
      ks = ref_aes256(key, cb);
      for (int j = 0; j < 16 && i + j < p.size(); j++) cq.push_back(p[i+j] ^ ks[127 - 8*j -: 8]);
    end
    for (int i = 0; i < a.size(); i += 16) y = ref_gmul(y ^ blk_of(a, i), h);
    for (int i = 0; i < cq.size(); i += 16) y = ref_gmul(y ^ blk_of(cq, i), h);
    y   = ref_gmul(y ^ {64'(a.size() * 8), 64'(cq.size() * 8)}, h);
    tag = y ^ ref_aes256(key, {iv, 32'd1});
    c   = cq;
  endtask

endpackage
