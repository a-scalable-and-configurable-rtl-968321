// GHASH with UNITS parallel multi-cycle multipliers (UNITS = 2 or 4).
//
// One multi-cycle multiplier takes a block every 4 cycles, too slow for an
// AES core with 2 (or 1) clocks per block. Here the blocks are hashed in
// groups of up to UNITS: for a group X_1 .. X_g,
//   Y_new = (Y xor X_1)*H^g xor X_2*H^(g-1) xor ... xor X_g*H,
// which equals g single GHASH steps. The UNITS multipliers compute the g
// products in parallel in 4 cycles, so the unit absorbs UNITS blocks every
// 4 cycles (one block every 2 cycles for UNITS = 2, every cycle for 4).
// The powers H^2 (and H^3, H^4) are computed with the same multipliers
// after h_load and kept in registers; no block is taken until they are
// ready (4 cycles for UNITS = 2, 8 for UNITS = 4).
//
// Interface: the same as the single-multiplier GHASH unit. Blocks are taken
// with in_valid/in_ready and padded first; the block after a full group is
// taken in the cycle that group is launched. A group is launched when UNITS
// blocks are collected or when the length block (in_len = 1, always the
// last block of a message) arrives, so a final group may be shorter; unused
// multipliers get zero operands. busy is 1 from the first block of a group
// until its result; y is Y and is forwarded in the cycle a group finishes.
//
// Using 2 or 4 parallel multi-cycle multipliers with stored powers of H is
// part of the architecture; the grouping, the power sequence and the
// interface are this design's own.
module ghash_par
  import aes_gcm_pkg::*;
#(
  parameter int unsigned UNITS = 2,
  parameter int unsigned KOA   = 2
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

  if (!(UNITS == 2 || UNITS == 4)) begin : g_bad_units
    $error("ghash_par: UNITS must be 2 or 4");
  end

  localparam int unsigned CW = $clog2(UNITS + 1);

  typedef enum logic [1:0] {P_IDLE, P_SQ, P_HI, P_RDY} pstate_e;

  pstate_e      ps_q;
  block_t       pw_q [1:UNITS];       // pw_q[i] = H^i
  block_t       xb_q [UNITS];         // collected blocks, in order
  logic [CW-1:0] gc_q;                 // blocks collected
  logic         full_q, pend_q, pw_go_q;
  block_t       y_q, x, ma [UNITS], mb [UNITS], mr [UNITS], sum;
  logic         m_go, m_rdy [UNITS], m_done [UNITS], launch, take;

  ghash_pad u_pad (
    .blk(in_block), .nbits(in_nbits), .sel_len(in_len),
    .len_a(len_a), .len_c(len_c), .out(x)
  );

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    gf128_mult_multi #(.KOA(KOA)) u_mult (
      .clk(clk), .rst_n(rst_n), .in_valid(m_go), .in_ready(m_rdy[u]),
      .a(ma[u]), .b(mb[u]), .out_valid(m_done[u]), .result(mr[u])
    );
  end

  always_comb begin
    sum = '0;
    for (int u = 0; u < UNITS; u++) sum ^= mr[u];
  end

  assign y        = (m_done[0] && pend_q) ? sum : y_q;
  assign in_ready = (ps_q == P_RDY) && (!full_q || launch) && !clear;
  assign take     = in_valid && in_ready;
  assign launch   = (ps_q == P_RDY) && full_q && m_rdy[0];
  assign m_go     = launch || pw_go_q;
  assign busy     = (gc_q != '0) || (pend_q && !m_done[0]);

  // multiplier operands: power computation or a group of blocks
  always_comb begin
    for (int u = 0; u < UNITS; u++) begin
      ma[u] = '0;
      mb[u] = '0;
    end
    if (ps_q == P_SQ) begin
      ma[0] = pw_q[1]; mb[0] = pw_q[1];                     // H^2
    end else if (ps_q == P_HI) begin
      ma[0] = pw_q[2]; mb[0] = pw_q[1];                     // H^3
      if (UNITS > 1) begin ma[1] = pw_q[2]; mb[1] = pw_q[2]; end  // H^4
    end else begin
      for (int u = 0; u < UNITS; u++)
        if (u < int'(gc_q)) begin
          ma[u] = (u == 0) ? (xb_q[u] ^ y) : xb_q[u];
          mb[u] = pw_q[int'(gc_q) - u];
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_q    <= P_IDLE;
      pw_go_q <= 1'b0;
      gc_q    <= '0;
      full_q  <= 1'b0;
      pend_q  <= 1'b0;
    end else begin
      pw_go_q <= 1'b0;
      if (h_load) begin
        ps_q    <= P_SQ;
        pw_go_q <= 1'b1;
      end else if (ps_q == P_SQ && m_done[0]) begin
        ps_q    <= (UNITS == 4) ? P_HI : P_RDY;
        pw_go_q <= (UNITS == 4);
      end else if (ps_q == P_HI && m_done[0]) begin
        ps_q <= P_RDY;
      end
      if (clear) begin
        gc_q   <= '0;
        full_q <= 1'b0;
        pend_q <= 1'b0;
      end else if (launch) begin
        gc_q   <= take ? CW'(1) : '0;    // a block may start the next group
        full_q <= take && in_len;
        pend_q <= 1'b1;
      end else begin
        if (m_done[0]) pend_q <= 1'b0;
        if (take) begin
          gc_q   <= gc_q + 1'b1;
          full_q <= in_len || (gc_q == CW'(UNITS - 1));
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (h_load) pw_q[1] <= h_in;
    if (ps_q == P_SQ && m_done[0]) pw_q[2] <= mr[0];
    if (UNITS == 4 && ps_q == P_HI && m_done[0]) begin
      pw_q[UNITS-1] <= mr[0];                              // H^3
      pw_q[UNITS]   <= mr[1];                              // H^4
    end
    if (take) xb_q[launch ? '0 : gc_q[CW-2:0]] <= x;
    if (clear)                  y_q <= '0;
    else if (pend_q && m_done[0]) y_q <= sum;
  end

endmodule
