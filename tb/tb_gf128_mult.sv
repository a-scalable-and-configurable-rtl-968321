// Testbench of the GHASH multipliers: single-cycle and multi-cycle units
// with KOA degrees 1 to 4 are compared with the bit-serial GCM product of
// the reference model on random operands and on corner cases (0, 1 = the
// block 80..00, all ones). Results must arrive 1 cycle (single) or 4 cycles
// (multi) after the operands are taken, and the multi-cycle unit must take
// a new pair in the cycle its result appears.
`timescale 1ns/1ps
module tb_gf128_mult;
  import aes_gcm_pkg::*;
  import tb_gcm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < 8; g++) begin : g_cfg
    localparam int KOA = (g % 4) + 1;
    localparam bit MULTI = (g >= 4);
    localparam int LAT = MULTI ? 4 : 1;
    logic in_valid, in_ready, out_valid;
    block_t a, b, result;

    if (MULTI) begin : g_m
      gf128_mult_multi #(.KOA(KOA)) u_dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
        .in_ready(in_ready), .a(a), .b(b), .out_valid(out_valid), .result(result));
    end else begin : g_s
      gf128_mult_single #(.KOA(KOA)) u_dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
        .in_ready(in_ready), .a(a), .b(b), .out_valid(out_valid), .result(result));
    end

    initial begin
      block_t ea [$];
      block_t eb [$];
      int t_in [$];
      int nin, nout, cyc;
      block_t xa, xb;
      in_valid = 0; a = '0; b = '0;
      wait (rst_n);
      nin = 0; nout = 0; cyc = 0;
      while (nout < 40 && cyc < 1000) begin
        @(negedge clk);
        case (nin)
          0: begin xa = '0; xb = {$urandom, $urandom, $urandom, $urandom}; end
          1: begin xa = {1'b1, 127'b0}; xb = {$urandom, $urandom, $urandom, $urandom}; end
          2: begin xa = '1; xb = '1; end
          default: begin xa = {$urandom, $urandom, $urandom, $urandom}; xb = {$urandom, $urandom, $urandom, $urandom}; end
        endcase
        in_valid = (nin < 40);
        a = xa; b = xb;
        #4;
        if (out_valid) begin
          check(result == ref_gmul(ea[0], eb[0]), $sformatf("%s KOA %0d product %0d", MULTI ? "multi" : "single", KOA, nout));
          check(cyc - t_in[0] == LAT, $sformatf("%s KOA %0d latency %0d", MULTI ? "multi" : "single", KOA, cyc - t_in[0]));
          void'(ea.pop_front()); void'(eb.pop_front()); void'(t_in.pop_front());
          nout++;
          if (MULTI) check(in_ready, "multi-cycle unit ready when its result appears");
        end
        if (in_valid && in_ready) begin
          ea.push_back(xa); eb.push_back(xb); t_in.push_back(cyc);
          nin++;
        end
        cyc++;
      end
      in_valid = 0;
      check(nout == 40, "all products");
      done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done == 8);
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
