// GCTR unit: counter-block generation and the AES core.
//
// After start, it feeds the AES core with, in this order: the all-zero block
// (its encryption is the hash key H = E(K, 0^128)), the pre-counter block
// J0 = IV || 0x00000001 (its encryption masks the tag), and the counter
// blocks CB_1 = IV || 0x00000002, CB_2, ... (32-bit increment of the last
// word), n_blocks of them. The encrypted blocks leave in the same order,
// marked with out_kind (KS_HKEY, KS_J0, KS_DATA); the caller XORs a KS_DATA
// block with a plaintext (or ciphertext) block to encrypt (or decrypt) it.
//
// Interface: start (one cycle, while idle) latches iv and n_blocks; with a
// global KEU it also starts the key expansion. key must be held for the
// whole operation. out_valid/out_ready is a handshake; without out_ready the
// AES core stalls. busy stays 1 until the last block has left.
// The use of 96-bit IVs (the only length accepted here) follows the
// CCSDS profile of GCM.
module gctr_unit
  import aes_gcm_pkg::*;
#(
  parameter int unsigned N          = 1,
  parameter sbox_impl_e  SBOX       = SBOX_LUT,
  parameter bit          GLOBAL_KEU = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  key256_t     key,
  input  logic        start,
  input  logic [95:0] iv,
  input  logic [31:0] n_blocks,
  output logic        busy,
  output logic        out_valid,
  output ks_kind_e    out_kind,
  output block_t      out_block,
  input  logic        out_ready
);

  block_t      cb_q;
  logic [32:0] to_issue_q, to_take_q;
  logic [1:0]  issued_q, taken_q;     // saturating counts of the first two blocks
  logic        aes_in_ready, aes_in_valid, key_ready;
  block_t      aes_in;

  assign aes_in_valid = (to_issue_q != '0) && key_ready;
  assign aes_in       = (issued_q == 2'd0) ? '0 : cb_q;

  aes_core #(.N(N), .SBOX(SBOX), .GLOBAL_KEU(GLOBAL_KEU)) u_aes (
    .clk(clk), .rst_n(rst_n), .key(key), .key_load(start), .key_ready(key_ready),
    .in_valid(aes_in_valid), .in_block(aes_in), .in_ready(aes_in_ready),
    .out_valid(out_valid), .out_block(out_block), .out_ready(out_ready)
  );

  assign out_kind = (taken_q == 2'd0) ? KS_HKEY : (taken_q == 2'd1) ? KS_J0 : KS_DATA;
  assign busy     = (to_take_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      to_issue_q <= '0;
      to_take_q  <= '0;
      issued_q   <= 2'd0;
      taken_q    <= 2'd0;
    end else if (start) begin
      to_issue_q <= 33'(n_blocks) + 33'd2;
      to_take_q  <= 33'(n_blocks) + 33'd2;
      issued_q   <= 2'd0;
      taken_q    <= 2'd0;
    end else begin
      if (aes_in_valid && aes_in_ready) begin
        to_issue_q <= to_issue_q - 33'd1;
        if (issued_q != 2'd2) issued_q <= issued_q + 2'd1;
      end
      if (out_valid && out_ready) begin
        to_take_q <= to_take_q - 33'd1;
        if (taken_q != 2'd2) taken_q <= taken_q + 2'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start)                              cb_q <= {iv, 32'd1};
    else if (aes_in_valid && aes_in_ready && issued_q != 2'd0) cb_q <= inc32(cb_q);
  end

endmodule
