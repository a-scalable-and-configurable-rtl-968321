// Configurable AES-256-GCM authenticated-encryption module.
//
// GCM combines counter-mode encryption (GCTR) with a polynomial hash over
// GF(2^128) (GHASH): C_i = P_i xor E(K, CB_i), Y_i = (Y_{i-1} xor X_i)*H over
// the blocks of A, C and len(A)||len(C), with H = E(K, 0^128), and the tag
// T = Y_m xor E(K, J0), J0 = IV || 0x00000001. The module has three parts: the
// GCTR unit (counter blocks, J0, and an AES-256 core of N cascaded stages),
// the GHASH unit (padding unit, H register, multiplier) and the control unit
// (FSM and, if DECRYPT_EN = 1, the MAC comparator used on the receive side).
//
// Synthesis-time configuration:
//   N          AES stages (1, 2, 3, 4, 5, 7, 14 -> 14, 7, 5, 4, 3, 2, 1 cycles/block)
//   SBOX       SBOX_LUT or SBOX_CFA S-boxes
//   GLOBAL_KEU one shared key expansion unit (1) or one per stage (0)
//   MULT       MULT_SINGLE (1 cycle) or MULT_MULTI (4 cycles) GHASH multiplier
//   KOA        Karatsuba-Ofman levels in the multiplier (1..4)
//   GH_UNITS   1: one GHASH multiplier of kind MULT; 2 or 4: that many
//              multi-cycle multipliers in parallel with stored powers of H
//              (MULT is then ignored)
//   DECRYPT_EN build the decryption/verification logic
// The defaults are the single-stage, LUT S-box, multi-cycle KOA-2 setting
// with decryption support.
//
// Use: present key (256 bits), iv (96 bits), len_a and len_c (bit lengths)
// and, to decrypt, decrypt = 1 and the received mac; pulse start while idle.
// Then stream ceil(len_a/128) blocks of A on a_* and ceil(len_c/128) blocks
// of plaintext (or ciphertext) on d_*, most significant bits first, a partial
// last block left-aligned. The result blocks leave on o_* (o_last on the
// final one), and tag_valid pulses with the 128-bit tag and, when
// decrypting, mac_match. All streams use valid/ready handshakes. The key,
// IV and lengths are registered at start.
module aes_gcm
  import aes_gcm_pkg::*;
#(
  parameter int unsigned N          = 1,
  parameter sbox_impl_e  SBOX       = SBOX_LUT,
  parameter bit          GLOBAL_KEU = 1'b0,
  parameter mult_impl_e  MULT       = MULT_MULTI,
  parameter int unsigned KOA        = 2,
  parameter bit          DECRYPT_EN = 1'b1,
  parameter int unsigned GH_UNITS   = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  key256_t     key,
  input  logic [95:0] iv,
  input  logic [63:0] len_a,
  input  logic [63:0] len_c,
  input  logic        decrypt,
  input  block_t      mac,
  output logic        idle,
  input  logic        a_valid,
  output logic        a_ready,
  input  block_t      a_data,
  input  logic        d_valid,
  output logic        d_ready,
  input  block_t      d_data,
  output logic        o_valid,
  input  logic        o_ready,
  output block_t      o_data,
  output logic        o_last,
  output logic        tag_valid,
  output block_t      tag,
  output logic        mac_match
);

  key256_t     key_q;
  logic [95:0] iv_q;
  logic        g_start, g_busy, ks_valid, ks_ready;
  logic [31:0] g_nblocks;
  ks_kind_e    ks_kind;
  block_t      ks_block, gh_block, gh_y;
  logic        gh_clear, gh_hload, gh_valid, gh_ready, gh_len, gh_busy;
  logic [7:0]  gh_nbits;
  logic [63:0] gh_len_a, gh_len_c;

  always_ff @(posedge clk) begin
    if (start && idle) begin
      key_q <= key;
      iv_q  <= iv;
    end
  end

  gctr_unit #(.N(N), .SBOX(SBOX), .GLOBAL_KEU(GLOBAL_KEU)) u_gctr (
    .clk(clk), .rst_n(rst_n), .key(key_q), .start(g_start), .iv(iv_q),
    .n_blocks(g_nblocks), .busy(g_busy), .out_valid(ks_valid), .out_kind(ks_kind),
    .out_block(ks_block), .out_ready(ks_ready)
  );

  if (GH_UNITS == 1) begin : g_gh1
    ghash_unit #(.MULT(MULT), .KOA(KOA)) u_ghash (
      .clk(clk), .rst_n(rst_n), .clear(gh_clear), .h_load(gh_hload), .h_in(ks_block),
      .in_valid(gh_valid), .in_ready(gh_ready), .in_block(gh_block), .in_nbits(gh_nbits),
      .in_len(gh_len), .len_a(gh_len_a), .len_c(gh_len_c), .busy(gh_busy), .y(gh_y)
    );
  end else begin : g_ghp
    ghash_par #(.UNITS(GH_UNITS), .KOA(KOA)) u_ghash (
      .clk(clk), .rst_n(rst_n), .clear(gh_clear), .h_load(gh_hload), .h_in(ks_block),
      .in_valid(gh_valid), .in_ready(gh_ready), .in_block(gh_block), .in_nbits(gh_nbits),
      .in_len(gh_len), .len_a(gh_len_a), .len_c(gh_len_c), .busy(gh_busy), .y(gh_y)
    );
  end

  gcm_control #(.DECRYPT_EN(DECRYPT_EN)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .len_a(len_a), .len_c(len_c),
    .decrypt(decrypt), .mac_in(mac), .idle(idle),
    .a_valid(a_valid), .a_ready(a_ready), .a_data(a_data),
    .d_valid(d_valid), .d_ready(d_ready), .d_data(d_data),
    .o_valid(o_valid), .o_ready(o_ready), .o_data(o_data), .o_last(o_last),
    .tag_valid(tag_valid), .tag(tag), .mac_match(mac_match),
    .g_start(g_start), .g_nblocks(g_nblocks), .ks_valid(ks_valid), .ks_kind(ks_kind),
    .ks_block(ks_block), .ks_ready(ks_ready),
    .gh_clear(gh_clear), .gh_hload(gh_hload), .gh_valid(gh_valid), .gh_ready(gh_ready),
    .gh_block(gh_block), .gh_nbits(gh_nbits), .gh_len(gh_len), .gh_len_a(gh_len_a),
    .gh_len_c(gh_len_c), .gh_busy(gh_busy), .gh_y(gh_y)
  );

  // The key-stream generator must have delivered every block when a message ends.
  a_gctr_drained: assert property (@(posedge clk) disable iff (!rst_n)
    tag_valid |-> !g_busy);

endmodule
