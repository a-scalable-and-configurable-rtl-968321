// Multi-cycle GHASH multiplier: the product of two GCM blocks in GF(2^128)
// computed in four cycles with one shared 64x64 sub-multiplier.
//
// One Karatsuba-Ofman split is done in time: with the operands in polynomial
// order a = ah*x^64 + al, the sub-multiplier forms ah*bh in the accept cycle,
// al*bl in the next one and (ah^al)*(bh^bl) in the third, each result kept in
// a register; the fourth cycle recombines the three sub-products into the
// 255-bit product and reduces it modulo x^128+x^7+x^2+x+1. The
// sub-multiplier itself is combinational, with KOA-1 further Karatsuba levels
// (KOA = 1: a schoolbook 64x64 multiplier).
//
// Timing: when in_ready = 1 a pair is accepted with in_valid; result and a
// one-cycle out_valid appear 4 cycles later, and in_ready is 1 again in that
// same cycle, so that a result can be fed back at once: one product every 4
// cycles. The operands only need to be valid in the accept cycle. The 3+1
// cycle schedule follows the architecture; the handshake is this design's.
module gf128_mult_multi
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

  logic [1:0]   phase_q;          // 0: idle/accept, 1: al*bl, 2: middle, 3: reduce
  logic [127:0] pa_q, pb_q, pa_in, pb_in;
  logic [63:0]  sa, sb;
  logic [126:0] sp, hh_q, ll_q, mm_q;
  logic [254:0] full;

  assign pa_in    = rev128(a);
  assign pb_in    = rev128(b);
  assign in_ready = (phase_q == 2'd0);

  always_comb begin
    unique case (phase_q)
      2'd0:    begin sa = pa_in[127:64];                 sb = pb_in[127:64]; end
      2'd1:    begin sa = pa_q[63:0];                    sb = pb_q[63:0]; end
      default: begin sa = pa_q[127:64] ^ pa_q[63:0];     sb = pb_q[127:64] ^ pb_q[63:0]; end
    endcase
  end

  gf128_koa_mul #(.W(64), .DEPTH(KOA - 1)) u_sub (.a(sa), .b(sb), .p(sp));

  assign full = {hh_q, 128'b0} ^ {64'b0, (mm_q ^ hh_q ^ ll_q), 64'b0} ^ {128'b0, ll_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q   <= 2'd0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= (phase_q == 2'd3);
      unique case (phase_q)
        2'd0:    if (in_valid) phase_q <= 2'd1;
        default: phase_q <= phase_q + 2'd1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    unique case (phase_q)
      2'd0: if (in_valid) begin
        pa_q <= pa_in;
        pb_q <= pb_in;
        hh_q <= sp;
      end
      2'd1: ll_q <= sp;
      2'd2: mm_q <= sp;
      2'd3: result <= rev128(gf128_reduce(full));
    endcase
  end

endmodule
