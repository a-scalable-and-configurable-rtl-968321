// Testbench of the TM input interface: frames of random bytes with header
// lengths 6, 16 and 21 and data lengths 37, 32 and 5 are sent as 4-byte words
// (TM clock 10 ns) and must come out (security clock 3.6 ns) as left-aligned
// 128-bit blocks, the header cut from the data, the last block of each part
// partial with the right byte count and the rest zero, and the is_a / last
// flags set. Random gaps on the input and random back-pressure on the output.
`timescale 1ns/100ps
module tb_tm_input_if;
  logic clk_tm = 0, clk_sec = 0, rst_tm_n = 0, rst_sec_n = 0;
  always #5.0 clk_tm = ~clk_tm;
  always #1.8 clk_sec = ~clk_sec;

  logic in_valid, in_ready, blk_valid, blk_ready, blk_is_a, blk_last;
  logic [31:0] in_data;
  logic [15:0] hdr_bytes, data_bytes;
  logic [127:0] blk_data;
  logic [4:0] blk_nbytes;
  int checks = 0, failures = 0;

  tm_input_if u_dut (
    .clk_tm(clk_tm), .rst_tm_n(rst_tm_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .clk_sec(clk_sec), .rst_sec_n(rst_sec_n), .hdr_bytes(hdr_bytes), .data_bytes(data_bytes),
    .blk_valid(blk_valid), .blk_ready(blk_ready), .blk_data(blk_data), .blk_nbytes(blk_nbytes),
    .blk_is_a(blk_is_a), .blk_last(blk_last));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { logic [127:0] d; int n; bit a; bit l; } blk_t;
  blk_t exp_q [$];
  byte unsigned frames [$][$];

  task automatic expect_part(input byte unsigned q [$], input bit is_a);
    blk_t b;
    for (int i = 0; i < q.size(); i += 16) begin
      b.d = '0;
      b.n = (q.size() - i >= 16) ? 16 : q.size() - i;
      for (int j = 0; j < b.n; j++) b.d[127 - 8*j -: 8] = q[i + j];
      b.a = is_a;
      b.l = (i + 16 >= q.size());
      exp_q.push_back(b);
    end
  endtask

  task automatic run(input int hb, input int db, input int nframes);
    byte unsigned h [$], d [$], f [$];
    int got;
    hdr_bytes = 16'(hb); data_bytes = 16'(db);
    exp_q.delete();
    for (int k = 0; k < nframes; k++) begin
      h.delete(); d.delete();
      for (int i = 0; i < hb; i++) h.push_back(byte'($urandom));
      for (int i = 0; i < db; i++) d.push_back(byte'($urandom));
      expect_part(h, 1);
      expect_part(d, 0);
      f = {h, d};
      frames.push_back(f);
    end
    got = 0;
    fork
      begin
        while (frames.size() != 0) begin
          f = frames.pop_front();
          for (int i = 0; i < f.size(); i += 4) begin
            @(negedge clk_tm);
            while ($urandom_range(0, 3) == 0) @(negedge clk_tm);
            for (int j = 0; j < 4; j++) in_data[31 - 8*j -: 8] = (i + j < f.size()) ? f[i + j] : 8'hee;
            in_valid = 1;
            @(posedge clk_tm);
            while (!in_ready) @(posedge clk_tm);
            @(negedge clk_tm);
            in_valid = 0;
          end
        end
      end
      begin
        while (exp_q.size() != 0) begin
          @(negedge clk_sec);
          blk_ready = ($urandom_range(0, 1) == 1);
          @(posedge clk_sec);
          if (blk_valid && blk_ready) begin
            check(blk_data == exp_q[0].d && blk_nbytes == 5'(exp_q[0].n) &&
                  blk_is_a == exp_q[0].a && blk_last == exp_q[0].l,
                  $sformatf("hdr %0d data %0d block %0d: %h n=%0d a=%b l=%b", hb, db, got, blk_data, blk_nbytes, blk_is_a, blk_last));
            void'(exp_q.pop_front());
            got++;
          end
        end
      end
    join
  endtask

  initial begin
    in_valid = 0; in_data = '0; blk_ready = 0; hdr_bytes = 16'd6; data_bytes = 16'd37;
    repeat (3) @(negedge clk_tm);
    rst_tm_n = 1; rst_sec_n = 1;
    run(6, 37, 3);
    run(16, 32, 2);
    run(21, 5, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_tm);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
