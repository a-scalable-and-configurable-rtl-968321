// Testbench of the AES-256 core for every supported number of stages
// N = 1, 2, 3, 4, 5, 7, 14 (local and global KEU alternating, CFA S-boxes for
// N = 3). Each instance encrypts a stream of random blocks under a random
// key; the outputs must come in order and match the reference model. With
// the output always ready, the first result must appear N*ceil(14/N) cycles
// after its input was taken (14 for N = 1) and results must follow each
// other every ceil(14/N) cycles (Table of clocks per block: 14, 7, 5, 4, 3,
// 2, 1). A second pass with random out_ready checks the stall.
`timescale 1ns/1ps
module tb_aes_core;
  import aes_gcm_pkg::*;
  import tb_gcm_ref_pkg::*;

  localparam int NC = 7;
  localparam int NS  [NC] = '{1, 2, 3, 4, 5, 7, 14};
  localparam int CPB [NC] = '{14, 7, 5, 4, 3, 2, 1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam sbox_impl_e SB = (g == 2) ? SBOX_CFA : SBOX_LUT;
    localparam bit GK = (g % 2 == 1);
    key256_t key;
    logic key_load, key_ready, in_valid, in_ready, out_valid, out_ready;
    block_t in_block, out_block;

    aes_core #(.N(NS[g]), .SBOX(SB), .GLOBAL_KEU(GK)) u_dut (
      .clk(clk), .rst_n(rst_n), .key(key), .key_load(key_load), .key_ready(key_ready),
      .in_valid(in_valid), .in_block(in_block), .in_ready(in_ready),
      .out_valid(out_valid), .out_block(out_block), .out_ready(out_ready));

    initial begin
      block_t pts [$];
      block_t exp [$];
      int nblk, ni, no, cyc, t_first_in, t_last_out;
      bit rnd;
      key = '0; key_load = 0; in_valid = 0; in_block = '0; out_ready = 1;
      wait (rst_n);
      for (int pass = 0; pass < 2; pass++) begin
        rnd = (pass == 1);
        @(negedge clk);
        key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        key_load = 1;
        @(negedge clk);
        key_load = 0;
        while (!key_ready) @(negedge clk);
        nblk = 2 * NS[g] + 3;
        pts.delete(); exp.delete();
        for (int i = 0; i < nblk; i++) begin
          pts.push_back({$urandom, $urandom, $urandom, $urandom});
          exp.push_back(ref_aes256(key, pts[i]));
        end
        ni = 0; no = 0; cyc = 0; t_first_in = -1; t_last_out = -1;
        while (no < nblk && cyc < 5000) begin
          in_valid  = (ni < nblk);
          in_block  = pts[(ni < nblk) ? ni : 0];
          out_ready = rnd ? ($urandom_range(0, 2) == 0) : 1'b1;
          #4;
          if (out_valid && out_ready) begin
            check(out_block == exp[no], $sformatf("N=%0d block %0d", NS[g], no));
            if (!rnd && no == 0)
              check(cyc - t_first_in == NS[g] * CPB[g], $sformatf("N=%0d latency %0d", NS[g], cyc - t_first_in));
            if (!rnd && no > 0)
              check(cyc - t_last_out == CPB[g], $sformatf("N=%0d spacing %0d", NS[g], cyc - t_last_out));
            t_last_out = cyc;
            no++;
          end
          if (in_valid && in_ready) begin
            if (ni == 0) t_first_in = cyc;
            ni++;
          end
          @(negedge clk);
          cyc++;
        end
        in_valid = 0;
        check(no == nblk, $sformatf("N=%0d all blocks out", NS[g]));
      end
      done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done == NC);
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
