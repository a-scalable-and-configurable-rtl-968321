// AES S-box (SubBytes on one byte), with two selectable implementations.
//
// IMPL = SBOX_LUT: a 256-entry table indexed by the input byte. The table is
// filled at elaboration from the S-box definition (inverse in GF(2^8), then
// the affine transform), so on a 6-input-LUT FPGA it maps to plain LUTs.
//
// IMPL = SBOX_CFA: composite-field arithmetic. The byte is mapped by a linear
// isomorphism into GF((2^4)^2) (GF(16) built on x^4+x+1, the quadratic
// extension on y^2+y+lambda), inverted there with one GF(16) inversion and a
// few GF(16) products, mapped back and passed through the affine transform.
// lambda and the isomorphism matrices are derived at elaboration: lambda is
// the first value making y^2+y+lambda irreducible, the mapping sends x to the
// first root of the AES polynomial found in the composite field.
//
// Purely combinational: out follows in. Having both versions selectable by a
// synthesis parameter follows the architecture; the choice of field
// polynomials for the CFA version is this design's own.
module aes_sbox
  import aes_gcm_pkg::*;
#(
  parameter sbox_impl_e IMPL = SBOX_LUT
) (
  input  logic [7:0] in,
  output logic [7:0] out
);

  // ---------------------------------------------------------------- GF(16)
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] p, t;
    p = 4'h0;
    t = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p ^= t;
      t = {t[2:0], 1'b0} ^ (t[3] ? 4'h3 : 4'h0);
    end
    return p;
  endfunction

  // a^14 = a^-1 (0 maps to 0)
  function automatic logic [3:0] gf16_inv(input logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gf16_mul(a, a);
    a4 = gf16_mul(a2, a2);
    a8 = gf16_mul(a4, a4);
    return gf16_mul(gf16_mul(a8, a4), a2);
  endfunction

  // ------------------------------------------------- elaboration-time setup
  function automatic logic [3:0] find_lambda();
    logic ok;
    for (int l = 1; l < 16; l++) begin
      ok = 1'b1;
      for (int y = 0; y < 16; y++)
        if ((gf16_mul(4'(y), 4'(y)) ^ 4'(y) ^ 4'(l)) == 4'h0) ok = 1'b0;
      if (ok) return 4'(l);
    end
    return 4'h0;
  endfunction

  localparam logic [3:0] LAMBDA = find_lambda();

  // Product in GF((2^4)^2): (ah y + al)(bh y + bl), y^2 = y + lambda
  function automatic logic [7:0] cmul(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] hh;
    hh = gf16_mul(a[7:4], b[7:4]);
    return {hh ^ gf16_mul(a[7:4], b[3:0]) ^ gf16_mul(a[3:0], b[7:4]),
            gf16_mul(hh, LAMBDA) ^ gf16_mul(a[3:0], b[3:0])};
  endfunction

  // Columns of the isomorphism: powers of a root of x^8+x^4+x^3+x+1.
  typedef logic [7:0][7:0] mat_t;

  function automatic mat_t build_map();
    mat_t cols;
    logic [7:0] p [9];
    for (int b = 2; b < 256; b++) begin
      p[0] = 8'h01;
      for (int i = 1; i <= 8; i++) p[i] = cmul(p[i-1], 8'(b));
      if ((p[8] ^ p[4] ^ p[3] ^ p[1] ^ p[0]) == 8'h00) begin
        for (int i = 0; i < 8; i++) cols[i] = p[i];
        return cols;
      end
    end
    return '0;
  endfunction

  localparam mat_t MAP = build_map();

  function automatic logic [7:0] apply(input mat_t m, input logic [7:0] x);
    logic [7:0] r;
    r = 8'h00;
    for (int i = 0; i < 8; i++)
      if (x[i]) r ^= m[i];
    return r;
  endfunction

  function automatic mat_t build_unmap();
    mat_t cols;
    for (int j = 0; j < 8; j++)
      for (int a = 0; a < 256; a++)
        if (apply(MAP, 8'(a)) == 8'(1 << j)) cols[j] = 8'(a);
    return cols;
  endfunction

  localparam mat_t UNMAP = build_unmap();

  typedef logic [255:0][7:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  // ------------------------------------------------------------ datapath
  if (IMPL == SBOX_LUT) begin : g_lut
    localparam table_t TABLE = build_table();
    assign out = TABLE[in];
  end else begin : g_cfa
    logic [7:0] m, inv_c;
    logic [3:0] ah, al, d, dinv;
    always_comb begin
      m     = apply(MAP, in);
      ah    = m[7:4];
      al    = m[3:0];
      d     = gf16_mul(gf16_mul(ah, ah), LAMBDA) ^ gf16_mul(ah, al) ^ gf16_mul(al, al);
      dinv  = gf16_inv(d);
      inv_c = {gf16_mul(ah, dinv), gf16_mul(ah ^ al, dinv)};
      out   = aes_affine(apply(UNMAP, inv_c));
    end
  end

endmodule
