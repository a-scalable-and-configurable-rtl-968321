// Testbench of the global key expansion unit: after start, ready must rise
// 14 cycles later and all fifteen round keys must match the reference key
// schedule; ready must be low while a new key is being expanded.
`timescale 1ns/1ps
module tb_aes_keu_global;
  import aes_gcm_pkg::*;
  import tb_gcm_ref_pkg::*;

  logic clk = 0, rst_n = 0, start, ready;
  key256_t key;
  block_t rk_all [15];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  aes_keu_global u_dut (.clk(clk), .rst_n(rst_n), .key(key), .start(start), .ready(ready), .rk_all(rk_all));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input key256_t k);
    int cyc;
    @(negedge clk);
    key = k; start = 1;
    @(negedge clk);
    start = 0; key = '0;
    cyc = 1;
    while (!ready && cyc < 100) begin
      check(!ready, "ready low during expansion");
      @(negedge clk);
      cyc++;
    end
    check(cyc == 14, $sformatf("start to ready %0d cycles, expected 14", cyc));
    for (int i = 0; i < 15; i++) check(rk_all[i] == ref_round_key(k, i), $sformatf("rk[%0d]", i));
  endtask

  initial begin
    start = 0; key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!ready, "not ready after reset");
    run(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    for (int t = 0; t < 5; t++)
      run({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
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
