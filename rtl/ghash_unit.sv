// GHASH unit: Y_i = (Y_{i-1} xor X_i) * H in GF(2^128).
//
// It holds the hash key H (loaded with h_load), the running value Y
// (cleared with clear at the start of a message), the padding unit and one
// multiplier, single-cycle (MULT = MULT_SINGLE, one block per cycle) or
// multi-cycle (MULT = MULT_MULTI, one block every 4 cycles), with KOA
// Karatsuba-Ofman levels.
//
// Interface: a block X_i is taken when in_valid and in_ready are both 1; it
// is first padded (in_nbits valid bits, or the length block when in_len = 1).
// busy is 1 while a product is still being computed; y is the current Y
// and is final once busy has fallen after the last block. The result of a
// product is forwarded straight to the next multiplication, so consecutive
// blocks are taken at the multiplier's full rate.
module ghash_unit
  import aes_gcm_pkg::*;
#(
  parameter mult_impl_e  MULT = MULT_MULTI,
  parameter int unsigned KOA  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        h_load,
  input  block_t      h_in,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      in_block,
  input  logic [7:0]  in_nbits,
  input  logic        in_len,
  input  logic [63:0] len_a,
  input  logic [63:0] len_c,
  output logic        busy,
  output block_t      y
);

  block_t h_q, y_q, x, m_res;
  logic   m_in_ready, m_out_valid, go, pending_q;

  ghash_pad u_pad (
    .blk(in_block), .nbits(in_nbits), .sel_len(in_len),
    .len_a(len_a), .len_c(len_c), .out(x)
  );

  assign y        = m_out_valid ? m_res : y_q;
  assign in_ready = m_in_ready && !clear;
  assign go       = in_valid && in_ready;
  assign busy     = pending_q && !m_out_valid;

  if (MULT == MULT_SINGLE) begin : g_single
    gf128_mult_single #(.KOA(KOA)) u_mult (
      .clk(clk), .rst_n(rst_n), .in_valid(go), .in_ready(m_in_ready),
      .a(y ^ x), .b(h_q), .out_valid(m_out_valid), .result(m_res)
    );
  end else begin : g_multi
    gf128_mult_multi #(.KOA(KOA)) u_mult (
      .clk(clk), .rst_n(rst_n), .in_valid(go), .in_ready(m_in_ready),
      .a(y ^ x), .b(h_q), .out_valid(m_out_valid), .result(m_res)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  pending_q <= 1'b0;
    else if (go)                 pending_q <= 1'b1;
    else if (m_out_valid)        pending_q <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (h_load) h_q <= h_in;
    if (clear)            y_q <= '0;
    else if (m_out_valid) y_q <= m_res;
  end

endmodule
