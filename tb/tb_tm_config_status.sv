// Testbench of the configuration/status block: every register written
// through the configuration port must appear on its output (key and IV
// words most significant first), len(A) || len(C) must be the two lengths in
// bits, and each toggle of frame_done_tgl must add one to the frame count.
`timescale 1ns/1ps
module tb_tm_config_status;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, tgl, enable;
  logic [3:0] cfg_addr;
  logic [31:0] cfg_wdata, status_frames;
  logic [15:0] spi, hdr_bytes, data_bytes;
  logic [95:0] iv_init;
  logic [255:0] key;
  logic [127:0] lens;
  int checks = 0, failures = 0;

  tm_config_status u_dut (
    .clk_tm(clk), .rst_tm_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .frame_done_tgl(tgl), .enable(enable), .spi(spi), .iv_init(iv_init), .key(key),
    .hdr_bytes(hdr_bytes), .data_bytes(data_bytes), .lens(lens), .status_frames(status_frames));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 4'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    logic [255:0] k;
    logic [95:0] iv;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; tgl = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!enable && status_frames == 0, "reset state");
    k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    iv = {$urandom, $urandom, $urandom};
    wr(1, 32'h0000abcd);
    for (int i = 0; i < 3; i++) wr(2 + i, iv[95 - 32*i -: 32]);
    for (int i = 0; i < 8; i++) wr(5 + i, k[255 - 32*i -: 32]);
    wr(13, 20);
    wr(14, 1105);
    wr(0, 1);
    check(enable, "enable");
    check(spi == 16'habcd, "SPI");
    check(iv_init == iv, "IV");
    check(key == k, "key");
    check(hdr_bytes == 20 && data_bytes == 1105, "lengths");
    check(lens == {64'd160, 64'd8840}, "len(A) || len(C) in bits");
    for (int f = 1; f <= 5; f++) begin
      @(negedge clk);
      tgl = ~tgl;
      repeat (5) @(negedge clk);
      check(status_frames == 32'(f), $sformatf("frame count %0d", status_frames));
    end
    wr(0, 0);
    check(!enable, "disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
