// Self-checking testbench of the AES-256-GCM module.
//
// Three instances with different configurations run the published AES-256
// GCM test cases (all-zero key with empty and one-block messages, and the
// 64-byte / 60-byte-with-20-byte-AAD messages under key feffe992...):
//   dut 0: defaults (1 stage, LUT S-boxes, local KEU, 4-cycle KOA-2 multiplier)
//   dut 1: 3 stages, CFA S-boxes, global KEU, 4-cycle KOA-1 multiplier
//   dut 2: 14 stages, LUT S-boxes, global KEU, 1-cycle KOA-3 multiplier
//   dut 3: 7 stages, global KEU, two parallel 4-cycle KOA-2 multipliers
//   dut 4: 14 stages, global KEU, four parallel 4-cycle KOA-2 multipliers
// Each message is encrypted (ciphertext and tag checked) and decrypted
// (plaintext checked, mac_match with the right and with a corrupted tag).
// With o_ready held high, the spacing of output blocks must equal the AES
// core's clocks per block (14, 5, 1, 2, 1); with random o_ready the results must
// not change. Random keys, IVs and lengths are also checked against an
// independent reference model.
`timescale 1ns/1ps
module tb_aes_gcm;
  import aes_gcm_pkg::*;
  import tb_gcm_ref_pkg::*;

  localparam int ND = 5;
  localparam int CPB [ND] = '{14, 5, 1, 2, 1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start [ND], idle [ND], decrypt [ND];
  key256_t     key [ND];
  logic [95:0] iv [ND];
  logic [63:0] len_a [ND], len_c [ND];
  block_t      mac [ND], a_data [ND], d_data [ND], o_data [ND], tag [ND];
  logic        a_valid [ND], a_ready [ND], d_valid [ND], d_ready [ND];
  logic        o_valid [ND], o_ready [ND], o_last [ND], tag_valid [ND], mac_match [ND];

  aes_gcm u_dut0 (
    .clk(clk), .rst_n(rst_n), .start(start[0]), .key(key[0]), .iv(iv[0]), .len_a(len_a[0]),
    .len_c(len_c[0]), .decrypt(decrypt[0]), .mac(mac[0]), .idle(idle[0]),
    .a_valid(a_valid[0]), .a_ready(a_ready[0]), .a_data(a_data[0]),
    .d_valid(d_valid[0]), .d_ready(d_ready[0]), .d_data(d_data[0]),
    .o_valid(o_valid[0]), .o_ready(o_ready[0]), .o_data(o_data[0]), .o_last(o_last[0]),
    .tag_valid(tag_valid[0]), .tag(tag[0]), .mac_match(mac_match[0]));

  aes_gcm #(.N(3), .SBOX(SBOX_CFA), .GLOBAL_KEU(1'b1), .MULT(MULT_MULTI), .KOA(1)) u_dut1 (
    .clk(clk), .rst_n(rst_n), .start(start[1]), .key(key[1]), .iv(iv[1]), .len_a(len_a[1]),
    .len_c(len_c[1]), .decrypt(decrypt[1]), .mac(mac[1]), .idle(idle[1]),
    .a_valid(a_valid[1]), .a_ready(a_ready[1]), .a_data(a_data[1]),
    .d_valid(d_valid[1]), .d_ready(d_ready[1]), .d_data(d_data[1]),
    .o_valid(o_valid[1]), .o_ready(o_ready[1]), .o_data(o_data[1]), .o_last(o_last[1]),
    .tag_valid(tag_valid[1]), .tag(tag[1]), .mac_match(mac_match[1]));

  aes_gcm #(.N(14), .SBOX(SBOX_LUT), .GLOBAL_KEU(1'b1), .MULT(MULT_SINGLE), .KOA(3)) u_dut2 (
    .clk(clk), .rst_n(rst_n), .start(start[2]), .key(key[2]), .iv(iv[2]), .len_a(len_a[2]),
    .len_c(len_c[2]), .decrypt(decrypt[2]), .mac(mac[2]), .idle(idle[2]),
    .a_valid(a_valid[2]), .a_ready(a_ready[2]), .a_data(a_data[2]),
    .d_valid(d_valid[2]), .d_ready(d_ready[2]), .d_data(d_data[2]),
    .o_valid(o_valid[2]), .o_ready(o_ready[2]), .o_data(o_data[2]), .o_last(o_last[2]),
    .tag_valid(tag_valid[2]), .tag(tag[2]), .mac_match(mac_match[2]));

  aes_gcm #(.N(7), .SBOX(SBOX_LUT), .GLOBAL_KEU(1'b1), .KOA(2), .GH_UNITS(2)) u_dut3 (
    .clk(clk), .rst_n(rst_n), .start(start[3]), .key(key[3]), .iv(iv[3]), .len_a(len_a[3]),
    .len_c(len_c[3]), .decrypt(decrypt[3]), .mac(mac[3]), .idle(idle[3]),
    .a_valid(a_valid[3]), .a_ready(a_ready[3]), .a_data(a_data[3]),
    .d_valid(d_valid[3]), .d_ready(d_ready[3]), .d_data(d_data[3]),
    .o_valid(o_valid[3]), .o_ready(o_ready[3]), .o_data(o_data[3]), .o_last(o_last[3]),
    .tag_valid(tag_valid[3]), .tag(tag[3]), .mac_match(mac_match[3]));

  aes_gcm #(.N(14), .SBOX(SBOX_LUT), .GLOBAL_KEU(1'b1), .KOA(2), .GH_UNITS(4)) u_dut4 (
    .clk(clk), .rst_n(rst_n), .start(start[4]), .key(key[4]), .iv(iv[4]), .len_a(len_a[4]),
    .len_c(len_c[4]), .decrypt(decrypt[4]), .mac(mac[4]), .idle(idle[4]),
    .a_valid(a_valid[4]), .a_ready(a_ready[4]), .a_data(a_data[4]),
    .d_valid(d_valid[4]), .d_ready(d_ready[4]), .d_data(d_data[4]),
    .o_valid(o_valid[4]), .o_ready(o_ready[4]), .o_data(o_data[4]), .o_last(o_last[4]),
    .tag_valid(tag_valid[4]), .tag(tag[4]), .mac_match(mac_match[4]));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Test vectors (GCM specification, AES-256 cases)
  localparam key256_t K0 = '0;
  localparam key256_t K1 = 256'hfeffe9928665731c6d6a8f9467308308feffe9928665731c6d6a8f9467308308;
  localparam logic [95:0] IV1 = 96'hcafebabefacedbaddecaf888;
  localparam logic [511:0] P1 = {
    128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
    128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255};
  localparam logic [511:0] C1 = {
    128'h522dc1f099567d07f47f37a32a84427d, 128'h643a8cdcbfe5c0c97598a2bd2555d1aa,
    128'h8cb08e48590dbb3da7b08b1056828838, 128'hc5f61e6393ba7a0abcc9f662898015ad};
  localparam logic [255:0] A1 = {128'hfeedfacedeadbeeffeedfacedeadbeef, 128'habaddad2000000000000000000000000};

  // Run one message on instance d; blocks are given as big vectors, block 0 leftmost.
  task automatic run(input int d, input key256_t k, input logic [95:0] ivv,
                     input logic [255:0] av, input int la, input logic [511:0] dv, input int lc,
                     input logic [511:0] ov, input block_t t_exp, input bit dec, input bit bad_mac,
                     input bit rnd_ready, input string name);
    int na, nc, ai, di, oi, cyc, last_o;
    bit fa, fd, fo;
    block_t mask;
    na = (la + 127) / 128;
    nc = (lc + 127) / 128;
    ai = 0; di = 0; oi = 0; cyc = 0; last_o = -1;
    @(negedge clk);
    key[d] = k; iv[d] = ivv; len_a[d] = 64'(la); len_c[d] = 64'(lc);
    decrypt[d] = dec; mac[d] = bad_mac ? (t_exp ^ 128'h1) : t_exp;
    start[d] = 1'b1;
    @(negedge clk);
    start[d] = 1'b0;
    while (!tag_valid[d] && cyc < 2000) begin
      a_valid[d] = (ai < na) && ($urandom_range(0, 3) != 0 || !rnd_ready);
      a_data[d]  = av[255 - 128*ai -: 128];
      d_valid[d] = (di < nc) && ($urandom_range(0, 3) != 0 || !rnd_ready);
      d_data[d]  = dv[511 - 128*di -: 128];
      o_ready[d] = rnd_ready ? ($urandom_range(0, 1) == 1) : 1'b1;
      #4;
      fa = a_valid[d] && a_ready[d];
      fd = d_valid[d] && d_ready[d];
      fo = o_valid[d] && o_ready[d];
      if (fo) begin
        mask = (oi == nc - 1 && lc % 128 != 0) ? ~('1 >> (lc % 128)) : '1;
        check(o_data[d] == (ov[511 - 128*oi -: 128] & mask), $sformatf("%s dut%0d out block %0d", name, d, oi));
        check(o_last[d] == (oi == nc - 1), $sformatf("%s dut%0d o_last %0d", name, d, oi));
        if (!rnd_ready && last_o >= 0)
          check(cyc - last_o == CPB[d], $sformatf("%s dut%0d block spacing %0d (expected %0d)", name, d, cyc - last_o, CPB[d]));
        last_o = cyc;
        oi++;
      end
      if (fa) ai++;
      if (fd) di++;
      @(negedge clk);
      cyc++;
    end
    a_valid[d] = 1'b0; d_valid[d] = 1'b0;
    check(tag_valid[d], $sformatf("%s dut%0d finished", name, d));
    check(oi == nc && ai == na && di == nc, $sformatf("%s dut%0d block counts", name, d));
    @(negedge clk);
    check(tag[d] == t_exp, $sformatf("%s dut%0d tag %h", name, d, tag[d]));
    if (dec) check(mac_match[d] == !bad_mac, $sformatf("%s dut%0d mac_match", name, d));
    else     check(!mac_match[d], $sformatf("%s dut%0d no mac_match when encrypting", name, d));
    check(idle[d], $sformatf("%s dut%0d idle", name, d));
  endtask

  // Random key (distinct halves), IV, 13-byte A and 37-byte P, checked
  // against the reference model in both directions.
  task automatic run_random(input int d, input bit r);
    key256_t k;
    logic [95:0] ivv;
    logic [255:0] av;
    logic [511:0] pv, cv;
    logic [127:0] t;
    bytes_t a, p, c;
    for (int i = 0; i < 8; i++) k[32*i +: 32] = $urandom;
    ivv = {$urandom, $urandom, $urandom};
    av = '0; pv = '0; cv = '0;
    for (int i = 0; i < 13; i++) begin a.push_back(byte'($urandom)); av[255 - 8*i -: 8] = a[i]; end
    for (int i = 0; i < 37; i++) begin p.push_back(byte'($urandom)); pv[511 - 8*i -: 8] = p[i]; end
    ref_gcm(k, ivv, a, p, c, t);
    for (int i = 0; i < 37; i++) cv[511 - 8*i -: 8] = c[i];
    run(d, k, ivv, av, 104, pv, 296, cv, t, 0, 0, r, "random enc");
    run(d, k, ivv, av, 104, cv, 296, pv, t, 1, 0, r, "random dec");
  endtask

  task automatic run_all(input int d);
    for (int r = 0; r < 2; r++) begin
      run_random(d, r[0]);
      run(d, K0, '0, '0, 0, '0, 0, '0, 128'h530f8afbc74536b9a963b4f1c4cb738b, 0, 0, r, "TC13");
      run(d, K0, '0, '0, 0, '0, 128, {128'hcea7403d4d606b6e074ec5d3baf39d18, 384'h0},
          128'hd0d1c8a799996bf0265b98b5d48ab919, 0, 0, r, "TC14 enc");
      run(d, K1, IV1, '0, 0, P1, 512, C1, 128'hb094dac5d93471bdec1a502270e3cc6c, 0, 0, r, "TC15 enc");
      run(d, K1, IV1, '0, 0, C1, 512, P1, 128'hb094dac5d93471bdec1a502270e3cc6c, 1, 0, r, "TC15 dec");
      run(d, K1, IV1, A1, 160, P1, 480, C1, 128'h76fc6ece0f4e1768cddf8853bb2d551b, 0, 0, r, "TC16 enc");
      run(d, K1, IV1, A1, 160, C1, 480, P1, 128'h76fc6ece0f4e1768cddf8853bb2d551b, 1, 0, r, "TC16 dec");
      run(d, K1, IV1, A1, 160, C1, 480, P1, 128'h76fc6ece0f4e1768cddf8853bb2d551b, 1, 1, r, "TC16 bad tag");
    end
  endtask

  initial begin
    for (int d = 0; d < ND; d++) begin
      start[d] = 0; decrypt[d] = 0; a_valid[d] = 0; d_valid[d] = 0; o_ready[d] = 1;
      key[d] = '0; iv[d] = '0; len_a[d] = '0; len_c[d] = '0; mac[d] = '0;
      a_data[d] = '0; d_data[d] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      run_all(0);
      run_all(1);
      run_all(2);
      run_all(3);
      run_all(4);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
