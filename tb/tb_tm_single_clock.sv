// Testbench of the TM Security Module in its single-clock configuration:
// three cascaded AES stages (5 clocks per block), the 4-cycle KOA-2 GHASH
// multiplier and no decryption logic, with the TM side and the security
// side driven by the same clock. The stimulus and checks are those of the
// multi-clock end-to-end test: a published GCM case (20-byte header, 60 data
// bytes, known ciphertext and tag) and four frames with a 6-byte header and
// 37 data bytes under a random key, with random input gaps and output
// back-pressure, every output byte compared with an independent AES-GCM
// reference model and each mechanism required to occur at least once.
`timescale 1ns/100ps
module tb_tm_single_clock;
  import tb_gcm_ref_pkg::*;

  logic clk_tm = 1'b0, rst_tm_n = 1'b0, rst_sec_n = 1'b0;
  always #4.0 clk_tm = ~clk_tm;
  wire clk_sec = clk_tm;

  logic        data_in_valid, data_in_ready, data_out_valid, data_out_ready, data_out_last;
  logic [31:0] data_in, data_out, status_frames, cfg_wdata;
  logic [3:0]  data_out_keep, cfg_addr;
  logic        cfg_we, status_enabled;

  tm_security_module #(.N(3)) u_dut (
    .clk_tm(clk_tm), .rst_tm_n(rst_tm_n), .clk_sec(clk_sec), .rst_sec_n(rst_sec_n),
    .data_in_valid(data_in_valid), .data_in_ready(data_in_ready), .data_in(data_in),
    .data_out_valid(data_out_valid), .data_out_ready(data_out_ready), .data_out(data_out),
    .data_out_keep(data_out_keep), .data_out_last(data_out_last),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .status_frames(status_frames), .status_enabled(status_enabled)
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_split = 0, n_partial = 0, n_iv_adv = 0, n_status = 0, n_aes_stall = 0;

  // mechanisms observed inside the module
  always @(posedge clk_sec) begin
    if (u_dut.u_in.take && u_dut.u_in.p_flush && !u_dut.u_in.f_ready) n_split++;
    if (u_dut.blk_valid && u_dut.blk_ready && u_dut.blk_nbytes != 5'd16) n_partial++;
    if (u_dut.gcm_start && u_dut.iv_q != u_dut.iv_init) n_iv_adv++;
    if (u_dut.u_gcm.u_gctr.out_valid && !u_dut.u_gcm.u_gctr.out_ready) n_aes_stall++;
  end
  bit rnd = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic cfg(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk_tm);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk_tm);
    cfg_we = 1'b0;
  endtask

  task automatic configure(input logic [255:0] k, input logic [95:0] iv, input logic [15:0] spi,
                           input int hb, input int db);
    cfg(0, 0);
    repeat (4) @(negedge clk_tm);
    cfg(1, 32'(spi));
    for (int i = 0; i < 3; i++) cfg(4'(2 + i), iv[95 - 32*i -: 32]);
    for (int i = 0; i < 8; i++) cfg(4'(5 + i), k[255 - 32*i -: 32]);
    cfg(13, 32'(hb));
    cfg(14, 32'(db));
    cfg(0, 1);
  endtask

  // frames to send and the expected output frames
  bytes_t in_frames[$];
  bytes_t exp_frames[$];

  task automatic send_frames();
    bytes_t f;
    int w;
    while (in_frames.size() != 0) begin
      f = in_frames.pop_front();
      for (int i = 0; i < f.size(); i += 4) begin
        @(negedge clk_tm);
        while (rnd && $urandom_range(0, 3) == 0) begin
          data_in_valid = 1'b0;
          @(negedge clk_tm);
        end
        for (int j = 0; j < 4; j++) data_in[31 - 8*j -: 8] = (i + j < f.size()) ? f[i+j] : 8'h00;
        data_in_valid = 1'b1;
        @(posedge clk_tm);
        while (!data_in_ready) @(posedge clk_tm);
        w++;
      end
      @(negedge clk_tm);
      data_in_valid = 1'b0;
    end
  endtask

  task automatic receive_frames(input int nframes);
    bytes_t got, exp;
    int f;
    f = 0;
    got = {};
    while (f < nframes) begin
      @(negedge clk_tm);
      data_out_ready = rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk_tm);
      if (data_out_valid && !data_out_ready) n_stall++;
      if (data_out_valid && data_out_ready) begin
        for (int j = 0; j < 4; j++)
          if (data_out_keep[3 - j]) got.push_back(data_out[31 - 8*j -: 8]);
        if (data_out_last) begin
          exp = exp_frames.pop_front();
          check(got.size() == exp.size(), $sformatf("frame %0d length %0d, expected %0d", f, got.size(), exp.size()));
          for (int i = 0; i < exp.size() && i < got.size(); i++)
            if (got[i] != exp[i]) begin
              check(0, $sformatf("frame %0d byte %0d: %02h, expected %02h", f, i, got[i], exp[i]));
              break;
            end
          checks++;
          got = {};
          f++;
        end
      end
    end
  endtask

  // build input frame and expected output frame
  task automatic make_frame(input logic [255:0] k, input logic [95:0] iv, input logic [15:0] spi,
                            input bytes_t hdr, input bytes_t dat, output logic [127:0] t_out,
                            output bytes_t c_out);
    bytes_t fin, fout, c;
    logic [127:0] t;
    ref_gcm(k, iv, hdr, dat, c, t);
    fin = {hdr, dat};
    fout = hdr;
    fout.push_back(spi[15:8]);
    fout.push_back(spi[7:0]);
    for (int i = 0; i < 12; i++) fout.push_back(iv[95 - 8*i -: 8]);
    fout = {fout, c};
    for (int i = 0; i < 16; i++) fout.push_back(t[127 - 8*i -: 8]);
    in_frames.push_back(fin);
    exp_frames.push_back(fout);
    t_out = t;
    c_out = c;
  endtask

  initial begin
    logic [255:0] k;
    logic [95:0]  iv;
    logic [127:0] t;
    bytes_t hdr, dat, c;
    int frames_before;

    data_in_valid = 0; data_in = '0; data_out_ready = 1; cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    repeat (3) @(negedge clk_tm);
    rst_tm_n = 1; rst_sec_n = 1;

    // ---- run 1: published test case
    k  = 256'hfeffe9928665731c6d6a8f9467308308feffe9928665731c6d6a8f9467308308;
    iv = 96'hcafebabefacedbaddecaf888;
    hdr = {}; dat = {};
    for (int i = 0; i < 20; i++) hdr.push_back(byte'(160'hfeedfacedeadbeeffeedfacedeadbeefabaddad2 >> (8 * (19 - i))));
    for (int i = 0; i < 60; i++) dat.push_back(byte'(480'hd9313225f88406e5a55909c5aff5269a86a7a9531534f7da2e4c303d8a318a721c3c0c95956809532fcf0e2449a6b525b16aedf5aa0de657ba637b39 >> (8 * (59 - i))));
    make_frame(k, iv, 16'h1234, hdr, dat, t, c);
    check(t == 128'h76fc6ece0f4e1768cddf8853bb2d551b, "reference model tag on the published case");
    check(c[0] == 8'h52 && c[59] == 8'h62, "reference model ciphertext on the published case");
    configure(k, iv, 16'h1234, 20, 60);
    check(status_enabled, "enabled");
    frames_before = status_frames;
    fork
      send_frames();
      receive_frames(1);
    join
    repeat (10) @(negedge clk_tm);
    check(status_frames == frames_before + 1, "status frame count, run 1");
    if (status_frames == frames_before + 1) n_status++;

    // ---- run 2: short header, odd data length, several frames, random timing
    rnd = 1;
    k  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    iv = {$urandom, $urandom, 32'hfffffffe};
    for (int f = 0; f < 4; f++) begin
      hdr = {}; dat = {};
      for (int i = 0; i < 6; i++) hdr.push_back(byte'($urandom));
      for (int i = 0; i < 37; i++) dat.push_back(byte'($urandom));
      make_frame(k, iv + 96'(f), 16'hbeef, hdr, dat, t, c);
    end
    configure(k, iv, 16'hbeef, 6, 37);
    frames_before = status_frames;
    fork
      send_frames();
      receive_frames(4);
    join
    repeat (10) @(negedge clk_tm);
    check(status_frames == frames_before + 4, "status frame count, run 2");
    if (status_frames == frames_before + 4) n_status++;

    check(n_stall > 0, "output back-pressure occurred");
    check(n_split > 0, "input word split between header and data occurred");
    check(n_partial > 0, "partial final block occurred");
    check(n_iv_adv > 0, "IV advance between frames occurred");
    check(n_status > 0, "status frame count updated");
    check(n_aes_stall > 0, "AES core stall occurred");
    $display("mechanisms: out_stalls=%0d aes_stalls=%0d split_words=%0d partial_blocks=%0d iv_advances=%0d status_updates=%0d",
             n_stall, n_aes_stall, n_split, n_partial, n_iv_adv, n_status);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk_tm);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
