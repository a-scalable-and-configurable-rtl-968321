// Control unit of the AES-GCM module: the sequencing FSM and the MAC
// comparator.
//
// For one message it starts the GCTR unit, stores the first AES result as
// the hash key H in the GHASH unit and the second one, E(K, J0), for the
// tag; then it passes the associated-data blocks to GHASH, combines each
// plaintext (or ciphertext) block with a key-stream block into the output
// and hands the ciphertext to GHASH, feeds the length block len(A)||len(C),
// waits for GHASH to finish and forms the tag T = Y_m xor E(K, J0). When
// DECRYPT_EN = 1 and the message was started with decrypt = 1, GHASH takes
// the input (ciphertext) blocks instead and the MAC comparator sets
// mac_match when T equals mac_in.
//
// Lengths are in bits. A and the data each occupy ceil(len/128) blocks; in
// the last block of each only the leading len mod 128 bits count, the rest is
// cleared before GHASH and on the output.
//
// Timing: start is taken in S_IDLE (idle = 1); the GCTR start follows one
// cycle later. A block of A is taken when a_valid and a_ready; a data block
// moves when d_valid, a key-stream block, GHASH readiness and o_ready meet
// (o_valid does not wait for o_ready). tag_valid is a one-cycle pulse; tag
// and mac_match hold until the next start.
module gcm_control
  import aes_gcm_pkg::*;
#(
  parameter bit DECRYPT_EN = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // message control
  input  logic        start,
  input  logic [63:0] len_a,
  input  logic [63:0] len_c,
  input  logic        decrypt,
  input  block_t      mac_in,
  output logic        idle,
  // associated data in
  input  logic        a_valid,
  output logic        a_ready,
  input  block_t      a_data,
  // plaintext / ciphertext in
  input  logic        d_valid,
  output logic        d_ready,
  input  block_t      d_data,
  // ciphertext / plaintext out
  output logic        o_valid,
  input  logic        o_ready,
  output block_t      o_data,
  output logic        o_last,
  // tag
  output logic        tag_valid,
  output block_t      tag,
  output logic        mac_match,
  // GCTR unit
  output logic        g_start,
  output logic [31:0] g_nblocks,
  input  logic        ks_valid,
  input  ks_kind_e    ks_kind,
  input  block_t      ks_block,
  output logic        ks_ready,
  // GHASH unit
  output logic        gh_clear,
  output logic        gh_hload,
  output logic        gh_valid,
  input  logic        gh_ready,
  output block_t      gh_block,
  output logic [7:0]  gh_nbits,
  output logic        gh_len,
  output logic [63:0] gh_len_a,
  output logic [63:0] gh_len_c,
  input  logic        gh_busy,
  input  block_t      gh_y
);

  typedef enum logic [2:0] {S_IDLE, S_HKEY, S_EJ0, S_AAD, S_DATA, S_LEN, S_WAIT} state_e;

  state_e      state_q;
  logic [63:0] len_a_q, len_c_q;
  logic [56:0] na_q, nc_q, cnt_q;
  logic        dec_q, fire, a_last, d_last;
  block_t      mac_q, ej0_q, out_mask, tag_calc;
  logic [7:0]  nbits_a, nbits_c;

  function automatic logic [56:0] nblk(input logic [63:0] len);
    return len[63:7] + 57'(|len[6:0]);
  endfunction

  assign idle      = (state_q == S_IDLE);
  assign nbits_a   = (len_a_q[6:0] == 7'd0) ? 8'd128 : {1'b0, len_a_q[6:0]};
  assign nbits_c   = (len_c_q[6:0] == 7'd0) ? 8'd128 : {1'b0, len_c_q[6:0]};
  assign a_last    = (cnt_q == na_q - 57'd1);
  assign d_last    = (cnt_q == nc_q - 57'd1);
  assign g_nblocks = nc_q[31:0];
  assign gh_clear  = idle && start;
  assign gh_len    = (state_q == S_LEN);
  assign gh_hload  = (state_q == S_HKEY) && ks_valid;
  assign out_mask  = d_last ? ~('1 >> nbits_c) : '1;
  assign gh_len_a  = len_a_q;
  assign gh_len_c  = len_c_q;
  assign tag_calc  = gh_y ^ ej0_q;

  always_comb begin
    a_ready  = 1'b0;
    d_ready  = 1'b0;
    ks_ready = 1'b0;
    o_valid  = 1'b0;
    gh_valid = 1'b0;
    gh_block = a_data;
    gh_nbits = 8'd128;
    fire     = 1'b0;
    o_data   = (d_data ^ ks_block) & out_mask;
    o_last   = d_last;
    unique case (state_q)
      S_HKEY, S_EJ0: ks_ready = 1'b1;
      S_AAD: begin
        gh_valid = a_valid;
        a_ready  = gh_ready;
        gh_nbits = a_last ? nbits_a : 8'd128;
      end
      S_DATA: begin
        o_valid  = d_valid && ks_valid && gh_ready;
        fire     = o_valid && o_ready;
        d_ready  = fire;
        ks_ready = fire;
        gh_valid = fire;
        gh_block = (DECRYPT_EN && dec_q) ? d_data : o_data;
        gh_nbits = d_last ? nbits_c : 8'd128;
      end
      S_LEN:   gh_valid = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      g_start   <= 1'b0;
      tag_valid <= 1'b0;
      mac_match <= 1'b0;
      cnt_q     <= '0;
    end else begin
      g_start   <= 1'b0;
      tag_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q   <= S_HKEY;
          g_start   <= 1'b1;
          mac_match <= 1'b0;
        end
        S_HKEY: if (ks_valid) state_q <= S_EJ0;
        S_EJ0: if (ks_valid) begin
          cnt_q   <= '0;
          state_q <= (na_q != '0) ? S_AAD : (nc_q != '0) ? S_DATA : S_LEN;
        end
        S_AAD: if (a_valid && a_ready) begin
          cnt_q <= cnt_q + 57'd1;
          if (a_last) begin
            cnt_q   <= '0;
            state_q <= (nc_q != '0) ? S_DATA : S_LEN;
          end
        end
        S_DATA: if (fire) begin
          cnt_q <= cnt_q + 57'd1;
          if (d_last) state_q <= S_LEN;
        end
        S_LEN:  if (gh_ready) state_q <= S_WAIT;
        S_WAIT: if (!gh_busy) begin
          tag_valid <= 1'b1;
          mac_match <= DECRYPT_EN && dec_q && (tag_calc == mac_q);
          state_q   <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (idle && start) begin
      len_a_q <= len_a;
      len_c_q <= len_c;
      na_q    <= nblk(len_a);
      nc_q    <= nblk(len_c);
      dec_q   <= decrypt;
      mac_q   <= mac_in;
    end
    if (state_q == S_EJ0 && ks_valid) ej0_q <= ks_block;
    if (state_q == S_WAIT && !gh_busy) tag <= tag_calc;
  end

  // The GCTR unit returns H first and E(K, J0) second.
  a_hkey_order: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_HKEY && ks_valid) |-> ks_kind == KS_HKEY);
  a_j0_order: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_EJ0 && ks_valid) |-> ks_kind == KS_J0);
  a_data_order: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_DATA && ks_valid) |-> ks_kind == KS_DATA);

endmodule
