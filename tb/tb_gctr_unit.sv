// Testbench of the GCTR unit: after start it must deliver E(K, 0^128) marked
// as hash key, E(K, IV||1) marked as J0, and E(K, IV||i+1) for the n data
// blocks, in order, also for n = 0. Checked for one AES stage with local
// KEUs and for three stages with a global KEU, with random out_ready.
`timescale 1ns/1ps
module tb_gctr_unit;
  import aes_gcm_pkg::*;
  import tb_gcm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    key256_t key;
    logic start, busy, out_valid, out_ready;
    logic [95:0] iv;
    logic [31:0] n_blocks;
    ks_kind_e out_kind;
    block_t out_block;

    gctr_unit #(.N(g == 0 ? 1 : 3), .GLOBAL_KEU(g == 1)) u_dut (
      .clk(clk), .rst_n(rst_n), .key(key), .start(start), .iv(iv), .n_blocks(n_blocks),
      .busy(busy), .out_valid(out_valid), .out_kind(out_kind), .out_block(out_block),
      .out_ready(out_ready));

    initial begin
      int no, cyc;
      block_t exp;
      ks_kind_e kexp;
      start = 0; out_ready = 0; key = '0; iv = '0; n_blocks = '0;
      wait (rst_n);
      for (int t = 0; t < 3; t++) begin
        @(negedge clk);
        key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        iv = {$urandom, $urandom, $urandom};
        n_blocks = (t == 0) ? 0 : 5;
        start = 1;
        @(negedge clk);
        start = 0;
        no = 0; cyc = 0;
        while (no < n_blocks + 2 && cyc < 2000) begin
          out_ready = ($urandom_range(0, 1) == 1);
          #4;
          if (out_valid && out_ready) begin
            if (no == 0)      begin exp = ref_aes256(key, '0);             kexp = KS_HKEY; end
            else if (no == 1) begin exp = ref_aes256(key, {iv, 32'd1});    kexp = KS_J0; end
            else              begin exp = ref_aes256(key, {iv, 32'(no)});  kexp = KS_DATA; end
            check(out_block == exp, $sformatf("gctr%0d test %0d block %0d", g, t, no));
            check(out_kind == kexp, $sformatf("gctr%0d test %0d kind %0d", g, t, no));
            no++;
          end
          @(negedge clk);
          cyc++;
        end
        check(no == n_blocks + 2, "all blocks delivered");
        check(!busy, "not busy afterwards");
      end
      done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
