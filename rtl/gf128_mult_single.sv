// Single-cycle GHASH multiplier: the product of two GCM blocks in GF(2^128).
//
// The operands are bit-reversed into polynomial order, multiplied by a fully
// combinational Karatsuba-Ofman multiplier with KOA iteration levels, the
// 255-bit product is reduced modulo x^128+x^7+x^2+x+1 and the result is
// reversed back into GCM block order and registered.
//
// Timing: in_ready is always 1; an operand pair accepted with in_valid at a
// clock edge gives result and out_valid (a one-cycle pulse) right after that
// edge, i.e. one product per cycle with a latency of 1 cycle. The
// single-cycle option and the configurable KOA degree follow the
// architecture; the register at the output is this design's choice.
module gf128_mult_single
  import aes_gcm_pkg::*;
#(
  parameter int unsigned KOA = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t a,
  input  block_t b,
  output logic   out_valid,
  output block_t result
);

  logic [254:0] prod;

  gf128_koa_mul #(.W(128), .DEPTH(KOA)) u_mul (
    .a(rev128(a)), .b(rev128(b)), .p(prod)
  );

  assign in_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) result <= rev128(gf128_reduce(prod));
  end

endmodule
