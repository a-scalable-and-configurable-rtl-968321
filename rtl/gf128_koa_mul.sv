// Carry-less (GF(2)[x]) multiplier of two W-bit polynomials built by DEPTH
// levels of Karatsuba-Ofman splitting.
//
// Each level splits every operand pair into high halves, low halves and the
// XOR of the halves, giving three half-width products instead of four. After
// DEPTH levels the 3^DEPTH products of width W/2^DEPTH are formed by plain
// shift-and-XOR multipliers, and the levels are recombined on the way back
// as hh*x^w ^ (mm^hh^ll)*x^(w/2) ^ ll. DEPTH = 0 is a schoolbook multiplier.
//
// Bit i of a, b and p is the coefficient of x^i. Purely combinational; the
// result has 2W-1 bits. W must be divisible by 2^DEPTH.
module gf128_koa_mul #(
  parameter int unsigned W     = 128,
  parameter int unsigned DEPTH = 2
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);

  function automatic int unsigned pow3(input int unsigned e);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r *= 3;
    return r;
  endfunction

  localparam int unsigned NB = pow3(DEPTH);
  localparam int unsigned BW = W >> DEPTH;

  if ((BW << DEPTH) != W || BW == 0) begin : g_bad_depth
    $error("gf128_koa_mul: W must be divisible by 2^DEPTH");
  end

  logic [W-1:0]   oa [DEPTH+1][NB];
  logic [W-1:0]   ob [DEPTH+1][NB];
  logic [2*W-1:0] pr [DEPTH+1][NB];

  always_comb begin
    int unsigned h;
    logic [W-1:0] mask, ha, la, hb, lb;
    logic [2*W-1:0] hh, ll, mm, acc;
    for (int l = 0; l <= int'(DEPTH); l++)
      for (int j = 0; j < int'(NB); j++) begin
        oa[l][j] = '0;
        ob[l][j] = '0;
        pr[l][j] = '0;
      end
    oa[0][0] = a;
    ob[0][0] = b;
    // operand splitting, level by level
    for (int l = 0; l < int'(DEPTH); l++) begin
      h    = (W >> l) / 2;
      mask = (W'(1) << h) - W'(1);
      for (int j = 0; j < int'(pow3(l)); j++) begin
        ha = (oa[l][j] >> h) & mask;
        la = oa[l][j] & mask;
        hb = (ob[l][j] >> h) & mask;
        lb = ob[l][j] & mask;
        oa[l+1][3*j]   = ha;
        ob[l+1][3*j]   = hb;
        oa[l+1][3*j+1] = la;
        ob[l+1][3*j+1] = lb;
        oa[l+1][3*j+2] = ha ^ la;
        ob[l+1][3*j+2] = hb ^ lb;
      end
    end
    // base products
    for (int j = 0; j < int'(NB); j++) begin
      acc = '0;
      for (int i = 0; i < int'(BW); i++)
        if (ob[DEPTH][j][i]) acc ^= ({{W{1'b0}}, oa[DEPTH][j]} << i);
      pr[DEPTH][j] = acc;
    end
    // recombination
    for (int l = int'(DEPTH) - 1; l >= 0; l--) begin
      h = (W >> l) / 2;
      for (int j = 0; j < int'(pow3(l)); j++) begin
        hh = pr[l+1][3*j];
        ll = pr[l+1][3*j+1];
        mm = pr[l+1][3*j+2];
        pr[l][j] = (hh << (2*h)) ^ ((mm ^ hh ^ ll) << h) ^ ll;
      end
    end
  end

  assign p = pr[0][0][2*W-2:0];

endmodule
