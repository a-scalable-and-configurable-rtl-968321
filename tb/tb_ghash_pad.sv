// Testbench of the GHASH padding unit: for every valid-bit count 1..128 the
// block must keep exactly its leading bits and clear the others; with
// sel_len the output must be len(A) || len(C).
`timescale 1ns/1ps
module tb_ghash_pad;
  import aes_gcm_pkg::*;

  block_t blk, out, exp;
  logic [7:0] nbits;
  logic sel_len;
  logic [63:0] len_a, len_c;
  int checks = 0, failures = 0;

  ghash_pad u_dut (.blk(blk), .nbits(nbits), .sel_len(sel_len), .len_a(len_a), .len_c(len_c), .out(out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    sel_len = 0; len_a = '0; len_c = '0;
    for (int n = 1; n <= 128; n++) begin
      blk = {$urandom, $urandom, $urandom, $urandom};
      nbits = 8'(n);
      for (int i = 0; i < 128; i++) exp[127 - i] = (i < n) ? blk[127 - i] : 1'b0;
      #1;
      check(out == exp, $sformatf("nbits %0d", n));
    end
    for (int t = 0; t < 10; t++) begin
      sel_len = 1;
      len_a = {$urandom, $urandom};
      len_c = {$urandom, $urandom};
      #1;
      check(out == {len_a, len_c}, "length block");
    end
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
