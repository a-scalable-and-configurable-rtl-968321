// One AES encryption round: SubBytes, ShiftRows, MixColumns (skipped when
// last = 1, as in the final round) and AddRoundKey with rk.
//
// Combinational; 16 S-boxes of the selected implementation. It is the round
// logic that an AES stage recycles through its round buffer.
module aes_round
  import aes_gcm_pkg::*;
#(
  parameter sbox_impl_e SBOX = SBOX_LUT
) (
  input  block_t state_in,
  input  block_t rk,
  input  logic   last,
  output block_t state_out
);

  block_t sub, shifted;

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    aes_sbox #(.IMPL(SBOX)) u_sbox (.in(state_in[8*k +: 8]), .out(sub[8*k +: 8]));
  end

  assign shifted   = shift_rows(sub);
  assign state_out = (last ? shifted : mix_columns(shifted)) ^ rk;

endmodule
