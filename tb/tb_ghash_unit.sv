// Testbench of the GHASH unit with the single-cycle (KOA 3) and the
// multi-cycle (KOA 2) multiplier. Messages of random blocks, the last one
// partial, followed by the length block, are hashed under a random H; the
// final Y must equal the reference (padding and bit-serial products), and
// blocks offered back to back must be taken every cycle (single) or every
// 4 cycles (multi).
`timescale 1ns/1ps
module tb_ghash_unit;
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
    localparam mult_impl_e M = (g == 0) ? MULT_SINGLE : MULT_MULTI;
    localparam int RATE = (g == 0) ? 1 : 4;
    logic clear, h_load, in_valid, in_ready, in_len, busy;
    block_t h_in, in_block, y;
    logic [7:0] in_nbits;
    logic [63:0] len_a, len_c;

    ghash_unit #(.MULT(M), .KOA(g == 0 ? 3 : 2)) u_dut (
      .clk(clk), .rst_n(rst_n), .clear(clear), .h_load(h_load), .h_in(h_in),
      .in_valid(in_valid), .in_ready(in_ready), .in_block(in_block), .in_nbits(in_nbits),
      .in_len(in_len), .len_a(len_a), .len_c(len_c), .busy(busy), .y(y));

    initial begin
      block_t h, yr, blocks [$];
      int nb, lastbits, i, cyc, t_prev;
      clear = 0; h_load = 0; in_valid = 0; in_len = 0; h_in = '0; in_block = '0;
      in_nbits = 8'd128; len_a = '0; len_c = '0;
      wait (rst_n);
      for (int t = 0; t < 4; t++) begin
        h = {$urandom, $urandom, $urandom, $urandom};
        nb = $urandom_range(1, 6);
        lastbits = $urandom_range(1, 128);
        blocks.delete();
        for (int k = 0; k < nb; k++) blocks.push_back({$urandom, $urandom, $urandom, $urandom});
        len_a = 64'(128 * (nb - 1) + lastbits);
        len_c = 64'(t);
        // reference
        yr = '0;
        for (int k = 0; k < nb; k++)
          yr = ref_gmul(yr ^ ((k == nb - 1) ? (blocks[k] & ~('1 >> lastbits)) : blocks[k]), h);
        yr = ref_gmul(yr ^ {len_a, len_c}, h);
        @(negedge clk);
        clear = 1; h_load = 1; h_in = h;
        @(negedge clk);
        clear = 0; h_load = 0;
        i = 0; cyc = 0; t_prev = -1;
        while (i <= nb && cyc < 500) begin
          in_valid = 1;
          in_len = (i == nb);
          in_block = (i < nb) ? blocks[i] : '0;
          in_nbits = (i == nb - 1) ? 8'(lastbits) : 8'd128;
          #4;
          if (in_ready) begin
            if (t_prev >= 0) check(cyc - t_prev == RATE, $sformatf("%0d-cycle unit block spacing %0d", RATE, cyc - t_prev));
            t_prev = cyc;
            i++;
          end
          @(negedge clk);
          cyc++;
        end
        in_valid = 0; in_len = 0;
        while (busy) @(negedge clk);
        check(y == yr, $sformatf("%0d-cycle unit Y, test %0d", RATE, t));
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
