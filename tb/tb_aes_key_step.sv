// Testbench of the AES-256 key-expansion step: starting from the cipher key,
// the step is applied 13 times and every round key rk[2..14] is compared with
// the reference key schedule, for the key of the AES standard's example
// (checking rk[2] against its printed value) and for random keys.
`timescale 1ns/1ps
module tb_aes_key_step;
  import aes_gcm_pkg::*;
  import tb_gcm_ref_pkg::*;

  block_t prev, nxt;
  logic [31:0] cur_w3;
  logic [3:0] idx;
  int checks = 0, failures = 0;

  aes_key_step u_dut (.prev(prev), .cur_w3(cur_w3), .next_idx(idx), .nxt(nxt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_key(input key256_t k);
    block_t a, b;
    a = k[255:128];
    b = k[127:0];
    for (int i = 2; i <= 14; i++) begin
      prev = a; cur_w3 = b[31:0]; idx = 4'(i);
      #1;
      check(nxt == ref_round_key(k, i), $sformatf("rk[%0d] of %h", i, k));
      a = b;
      b = nxt;
    end
  endtask

  initial begin
    key256_t k;
    k = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    prev = k[255:128]; cur_w3 = k[31:0]; idx = 4'd2;
    #1;
    check(nxt == 128'ha573c29fa176c498a97fce93a572c09c, "rk[2] of the standard's example key");
    run_key(k);
    for (int t = 0; t < 10; t++)
      run_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
