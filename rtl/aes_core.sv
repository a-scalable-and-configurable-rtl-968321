// AES-256 encryption core built from N cascaded AES stages.
//
// Each stage recycles one round RPS = ceil(14/N) times, so the chain accepts a
// new 128-bit block every RPS cycles (clocks per block, CPB) and returns it
// N*RPS cycles later (14 cycles for N = 1). The supported N are those for
// which every extra stage lowers the CPB: 1, 2, 3, 4, 5, 7 and 14 (CPB 14,
// 7, 5, 4, 3, 2 and 1). The initial AddRoundKey with rk[0] is applied on the
// way into stage 0.
//
// A shared counter cnt runs 0..RPS-1; when it is 0 every stage takes the
// block of the stage before it (stage 0 the input), and the block leaving the
// last stage is offered on the output. A valid bit follows each block.
//
// Interface: in_valid/in_ready and out_valid/out_ready handshakes (a transfer
// happens when both are high). in_ready and out_valid can only be high when
// cnt = 0. If an output is not taken, the whole chain stalls until it is.
// With GLOBAL_KEU = 0 every stage has its own KEU and key must stay stable
// while blocks are in flight (key_load is unused and key_ready is 1). With
// GLOBAL_KEU = 1 a pulse on key_load expands the key in the global KEU; no
// block is accepted until key_ready returns high 14 cycles later.
//
// The cascaded single-round stages, the CPB table and the local/global KEU
// choice follow the architecture; the handshakes and the stall are this
// design's own.
module aes_core
  import aes_gcm_pkg::*;
#(
  parameter int unsigned N          = 1,
  parameter sbox_impl_e  SBOX       = SBOX_LUT,
  parameter bit          GLOBAL_KEU = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  key256_t key,
  input  logic    key_load,
  output logic    key_ready,
  input  logic    in_valid,
  input  block_t  in_block,
  output logic    in_ready,
  output logic    out_valid,
  output block_t  out_block,
  input  logic    out_ready
);

  localparam int unsigned RPS = (AES_ROUNDS + N - 1) / N;

  if (!(N == 1 || N == 2 || N == 3 || N == 4 || N == 5 || N == 7 || N == 14)) begin : g_bad_n
    $error("aes_core: N must be 1, 2, 3, 4, 5, 7 or 14");
  end

  logic       en, load;
  logic [3:0] cnt_q;
  logic [N-1:0] v_q;
  block_t     st   [N];
  key256_t    kp   [N];
  logic [4:0] rno  [N];
  block_t     rk_g [N];
  block_t     rk0;
  block_t     rk_all [15];

  if (GLOBAL_KEU) begin : g_gkeu
    aes_keu_global #(.SBOX(SBOX)) u_keu (
      .clk(clk), .rst_n(rst_n), .key(key), .start(key_load),
      .ready(key_ready), .rk_all(rk_all)
    );
    assign rk0 = rk_all[0];
  end else begin : g_lkeu
    assign key_ready = 1'b1;
    assign rk0       = key[255:128];
    for (genvar i = 0; i < 15; i++) begin : g_zero
      assign rk_all[i] = '0;
    end
    logic unused;
    assign unused = key_load;
  end

  assign load      = (cnt_q == 4'd0);
  assign out_valid = v_q[N-1] && load;
  assign en        = key_ready && !(out_valid && !out_ready);
  assign in_ready  = en && load;
  assign out_block = st[N-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= 4'd0;
      v_q   <= '0;
    end else if (en) begin
      cnt_q <= (cnt_q == 4'(RPS - 1)) ? 4'd0 : cnt_q + 4'd1;
      if (load) begin
        v_q[0] <= in_valid;
        for (int i = 1; i < N; i++) v_q[i] <= v_q[i-1];
      end
    end
  end

  for (genvar s = 0; s < N; s++) begin : g_stage
    block_t  s_in;
    key256_t s_kp;
    if (s == 0) begin : g_first
      assign s_in = in_block ^ rk0;
      assign s_kp = key;
      if (N == 1) begin : g_unused_kp
        logic unused;
        assign unused = ^kp[0];
      end
    end else begin : g_next
      assign s_in = st[s-1];
      assign s_kp = kp[s-1];
    end
    assign rk_g[s] = rk_all[(rno[s] > 5'd14) ? 4'd14 : rno[s][3:0]];
    aes_stage #(.SBOX(SBOX), .STAGE(s), .RPS(RPS), .GLOBAL_KEU(GLOBAL_KEU)) u_stage (
      .clk      (clk),
      .en       (en),
      .load     (load),
      .cnt      (cnt_q),
      .in_state (s_in),
      .in_kp    (s_kp),
      .rk_g     (rk_g[s]),
      .out_state(st[s]),
      .out_kp   (kp[s]),
      .round_no (rno[s])
    );
  end

endmodule
