// Global key expansion unit (KEU) of the AES core, shared by all stages.
//
// On start it copies the 256-bit cipher key into round keys rk[0] and rk[1]
// and then derives rk[2] ... rk[14], one per cycle, with the AES-256 key
// expansion step; ready rises when all fifteen round keys are stored and
// stays high until the next start. All round keys are then available at
// once, so any number of cascaded stages can read the key of the round they
// execute. Start to ready takes 14 cycles.
//
// The shared, fully stored key schedule as an alternative to per-stage KEUs
// is part of the architecture; storing rk[0] and rk[1] in registers of their
// own (15 round-key registers in all) is this design's choice.
module aes_keu_global
  import aes_gcm_pkg::*;
#(
  parameter sbox_impl_e SBOX = SBOX_LUT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  key256_t    key,
  input  logic       start,
  output logic       ready,
  output block_t     rk_all [15]
);

  block_t     rk_q [15];
  logic [3:0] idx_q;
  logic       busy_q;
  block_t     rk_new;

  aes_key_step #(.SBOX(SBOX)) u_step (
    .prev    (rk_q[idx_q - 4'd2]),
    .cur_w3  (rk_q[idx_q - 4'd1][31:0]),
    .next_idx(idx_q),
    .nxt     (rk_new)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      ready  <= 1'b0;
      idx_q  <= 4'd2;
    end else if (start) begin
      busy_q <= 1'b1;
      ready  <= 1'b0;
      idx_q  <= 4'd2;
    end else if (busy_q) begin
      idx_q <= idx_q + 4'd1;
      if (idx_q == 4'd14) begin
        busy_q <= 1'b0;
        ready  <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      rk_q[0] <= key[255:128];
      rk_q[1] <= key[127:0];
    end else if (busy_q) begin
      rk_q[idx_q] <= rk_new;
    end
  end

  assign rk_all = rk_q;

endmodule
