// One step of the AES-256 key expansion, computed on the fly.
//
// Given round key rk[i-1] and the last 32-bit word of rk[i], it returns
// rk[i+1] (next_idx = i+1, valid from 2 to 14). Following the AES-256
// schedule (eight 32-bit words of key per step pair), the first word of
// rk[i+1] is rk[i-1].w0 xor g(rk[i].w3), where g is RotWord, SubWord and the
// round constant rcon(next_idx/2) when next_idx is even, and SubWord alone
// when next_idx is odd; each following word adds the one before it.
//
// This is the arithmetic of a key expansion unit (KEU): a local KEU keeps the
// pair {rk[i-1], rk[i]} in two 128-bit registers inside an AES stage and
// applies this step once per round; the global KEU applies it 13 times when a
// key is loaded. Combinational; four S-boxes of the selected kind.
module aes_key_step
  import aes_gcm_pkg::*;
#(
  parameter sbox_impl_e SBOX = SBOX_LUT
) (
  input  block_t      prev,      // rk[i-1]
  input  logic [31:0] cur_w3,    // last word of rk[i]
  input  logic [3:0]  next_idx,  // i+1
  output block_t      nxt        // rk[i+1]
);

  logic [31:0] last_w, sub_in, sub_out, g;
  logic [7:0]  rc;

  assign last_w = cur_w3;
  // RotWord only before the round-constant step (even index)
  assign sub_in = next_idx[0] ? last_w : {last_w[23:0], last_w[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox #(.IMPL(SBOX)) u_sbox (.in(sub_in[8*b +: 8]), .out(sub_out[8*b +: 8]));
  end

  always_comb begin
    unique case (next_idx[3:1])
      3'd1:    rc = 8'h01;
      3'd2:    rc = 8'h02;
      3'd3:    rc = 8'h04;
      3'd4:    rc = 8'h08;
      3'd5:    rc = 8'h10;
      3'd6:    rc = 8'h20;
      3'd7:    rc = 8'h40;
      default: rc = 8'h00;
    endcase
  end

  assign g = next_idx[0] ? sub_out : (sub_out ^ {rc, 24'h000000});

  always_comb begin
    nxt[127:96] = prev[127:96] ^ g;
    nxt[95:64]  = prev[95:64]  ^ nxt[127:96];
    nxt[63:32]  = prev[63:32]  ^ nxt[95:64];
    nxt[31:0]   = prev[31:0]   ^ nxt[63:32];
  end

endmodule
