// Testbench of one AES stage used as a complete single-stage AES-256
// (STAGE = 0, RPS = 14): with its local KEU (key pair loaded with the block)
// and with round keys supplied from outside as a global KEU would. A block
// XORed with rk[0] is loaded, 14 rounds run in 14 cycles, and the round
// buffer must then hold the ciphertext of the reference model (the first
// vector is the AES standard's AES-256 example). A second local-KEU instance
// is a middle stage (STAGE = 1, RPS = 5, rounds 6..10), fed with the state and
// key pair that the reference gives after round 5.
`timescale 1ns/1ps
module tb_aes_stage;
  import aes_gcm_pkg::*;
  import tb_gcm_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic en, load, load_m;
  logic [3:0] cnt, cnt_m;
  block_t in_state, rk_g, in_m, out_l, out_g, out_m;
  key256_t in_kp, kp_l, kp_g, kp_m, in_kp_m;
  logic [4:0] rno_l, rno_g, rno_m;
  int checks = 0, failures = 0;

  aes_stage #(.STAGE(0), .RPS(14), .GLOBAL_KEU(1'b0)) u_local (
    .clk(clk), .en(en), .load(load), .cnt(cnt), .in_state(in_state), .in_kp(in_kp),
    .rk_g('0), .out_state(out_l), .out_kp(kp_l), .round_no(rno_l));
  aes_stage #(.STAGE(0), .RPS(14), .GLOBAL_KEU(1'b1)) u_global (
    .clk(clk), .en(en), .load(load), .cnt(cnt), .in_state(in_state), .in_kp('0),
    .rk_g(rk_g), .out_state(out_g), .out_kp(kp_g), .round_no(rno_g));
  aes_stage #(.STAGE(1), .RPS(5), .GLOBAL_KEU(1'b0)) u_mid (
    .clk(clk), .en(en), .load(load_m), .cnt(cnt_m), .in_state(in_m), .in_kp(in_kp_m),
    .rk_g('0), .out_state(out_m), .out_kp(kp_m), .round_no(rno_m));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference state after round r (r = 0: after the initial AddRoundKey)
  function automatic block_t ref_after(key256_t k, block_t pt, int r);
    block_t s;
    s = pt ^ ref_round_key(k, 0);
    for (int i = 1; i <= r; i++) begin
      block_t sb, sh;
      for (int b = 0; b < 16; b++) sb[127 - 8*b -: 8] = ref_sbox(s[127 - 8*b -: 8]);
      sh = shift_rows(sb);
      s = ((i == 14) ? sh : mix_columns(sh)) ^ ref_round_key(k, i);
    end
    return s;
  endfunction

  task automatic run(input key256_t k, input block_t pt);
    block_t ct;
    ct = ref_aes256(k, pt);
    @(negedge clk);
    en = 1; load = 1; cnt = 0; in_state = pt ^ k[255:128]; in_kp = k; rk_g = ref_round_key(k, 1);
    load_m = 1; cnt_m = 0; in_m = ref_after(k, pt, 5); in_kp_m = {ref_round_key(k, 5), ref_round_key(k, 6)};
    for (int c = 1; c < 14; c++) begin
      @(negedge clk);
      load = 0; load_m = 0; cnt = 4'(c); cnt_m = (c < 5) ? 4'(c) : 4'd0;
      rk_g = ref_round_key(k, c + 1);
      if (c == 5) check(out_m == ref_after(k, pt, 10), "middle stage after rounds 6..10");
      if (c == 5) check(kp_m == {ref_round_key(k, 10), ref_round_key(k, 11)}, "middle stage key pair");
    end
    @(negedge clk);
    en = 0;
    check(out_l == ct, $sformatf("local KEU result %h expected %h", out_l, ct));
    check(out_g == ct, $sformatf("global KEU result %h expected %h", out_g, ct));
    check(rno_l == 5'd14 && rno_m == 5'd6, "round numbers");
  endtask

  initial begin
    en = 0; load = 0; cnt = 0; load_m = 0; cnt_m = 0;
    in_state = '0; in_kp = '0; rk_g = '0; in_m = '0; in_kp_m = '0;
    run(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h00112233445566778899aabbccddeeff);
    check(out_l == 128'h8ea2b7ca516745bfeafc49904b496089, "standard's AES-256 example");
    for (int t = 0; t < 8; t++)
      run({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
          {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
