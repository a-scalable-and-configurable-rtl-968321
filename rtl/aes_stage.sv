// One AES stage: a single AES-256 round that is recycled through a round
// buffer, so that a block goes through RPS consecutive rounds in RPS cycles.
//
// A multiplexer selects the block arriving from the input (or the previous
// stage) when load = 1 and the round buffer otherwise; the selected block
// passes one round and is written back to the round buffer. Stage number
// STAGE performs rounds STAGE*RPS+1 ... STAGE*RPS+RPS; rounds beyond 14 (only
// possible in the last stage when 14 is not a multiple of RPS) leave the
// block unchanged. Round 14 omits MixColumns.
//
// Key expansion: with GLOBAL_KEU = 0 the stage has its own local KEU, two
// 128-bit registers holding {rk[r-1], rk[r]} that follow the block and are
// stepped once per round; they are loaded with the pair of the previous
// stage (or with the cipher key for stage 0) together with the block. With
// GLOBAL_KEU = 1 the round key comes from the shared KEU through rk_g, and
// the local registers are not built.
//
// Timing: every cycle with en = 1 executes one round; cnt (0..RPS-1) is the
// round index inside the stage, shared by all stages of the core. out_state
// and out_kp are the round buffer and the local KEU registers.
module aes_stage
  import aes_gcm_pkg::*;
#(
  parameter sbox_impl_e  SBOX       = SBOX_LUT,
  parameter int unsigned STAGE      = 0,
  parameter int unsigned RPS        = 14,
  parameter bit          GLOBAL_KEU = 1'b0
) (
  input  logic        clk,
  input  logic        en,
  input  logic        load,
  input  logic [3:0]  cnt,
  input  block_t      in_state,
  input  key256_t     in_kp,     // {rk[r-1], rk[r]} for the first round of this stage
  input  block_t      rk_g,      // round key from the global KEU
  output block_t      out_state,
  output key256_t     out_kp,
  output logic [4:0]  round_no   // round executed in this cycle (1..)
);

  block_t  state_q, src_state, round_out, rk;
  logic    active, last;

  assign round_no  = 5'(STAGE * RPS) + 5'(cnt) + 5'd1;
  assign active    = (round_no <= 5'(AES_ROUNDS));
  assign last      = (round_no == 5'(AES_ROUNDS));
  assign src_state = load ? in_state : state_q;

  aes_round #(.SBOX(SBOX)) u_round (
    .state_in (src_state),
    .rk       (rk),
    .last     (last),
    .state_out(round_out)
  );

  always_ff @(posedge clk) begin
    if (en) state_q <= active ? round_out : src_state;
  end

  assign out_state = state_q;

  if (GLOBAL_KEU) begin : g_global
    assign rk     = rk_g;
    assign out_kp = '0;
    logic unused;
    assign unused = ^in_kp;
  end else begin : g_local
    key256_t kp_q, src_kp;
    block_t  rk_next;
    assign src_kp = load ? in_kp : kp_q;
    assign rk     = src_kp[127:0];
    aes_key_step #(.SBOX(SBOX)) u_step (
      .prev    (src_kp[255:128]),
      .cur_w3  (src_kp[31:0]),
      .next_idx(round_no[3:0] + 4'd1),
      .nxt     (rk_next)
    );
    always_ff @(posedge clk) begin
      if (en) kp_q <= (active && !last) ? {src_kp[127:0], rk_next} : src_kp;
    end
    assign out_kp = kp_q;
    logic unused;
    assign unused = ^rk_g;
  end

endmodule
