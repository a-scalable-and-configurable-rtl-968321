// Testbench of the TM output data handler: for random header blocks, SPI||IV,
// ciphertext blocks and tag, the 128-bit words leaving it must hold exactly
// header || SPI || IV || data || tag, byte-contiguous, with the byte count
// and end-of-frame flag on the last word. Header lengths 6 and 20, data
// lengths 37 and 48; random back-pressure; the tag arrives after the data.
`timescale 1ns/1ps
module tb_tm_output_handler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_start, ready_frame, a_valid, a_ready, c_valid, c_ready, tag_valid;
  logic out_valid, out_ready, out_last;
  logic [15:0] hdr_bytes, data_bytes;
  logic [111:0] sh;
  logic [127:0] a_data, c_data, tag, out_data;
  logic [4:0] out_nbytes;
  int checks = 0, failures = 0;

  tm_output_handler u_dut (
    .clk(clk), .rst_n(rst_n), .hdr_bytes(hdr_bytes), .data_bytes(data_bytes),
    .frame_start(frame_start), .sh(sh), .ready_frame(ready_frame),
    .a_valid(a_valid), .a_ready(a_ready), .a_data(a_data),
    .c_valid(c_valid), .c_ready(c_ready), .c_data(c_data),
    .tag_valid(tag_valid), .tag(tag),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .out_nbytes(out_nbytes), .out_last(out_last));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int hb, input int db);
    byte unsigned h [$], d [$], e [$], got [$];
    logic [127:0] t;
    logic [111:0] s;
    bit last_seen;
    for (int i = 0; i < hb; i++) h.push_back(byte'($urandom));
    for (int i = 0; i < db; i++) d.push_back(byte'($urandom));
    s = {$urandom, $urandom, $urandom, $urandom};
    t = {$urandom, $urandom, $urandom, $urandom};
    e = h;
    for (int i = 0; i < 14; i++) e.push_back(s[111 - 8*i -: 8]);
    e = {e, d};
    for (int i = 0; i < 16; i++) e.push_back(t[127 - 8*i -: 8]);
    hdr_bytes = 16'(hb); data_bytes = 16'(db);
    @(negedge clk);
    check(ready_frame, "ready for a frame");
    frame_start = 1; sh = s;
    @(negedge clk);
    frame_start = 0;
    last_seen = 0;
    fork
      begin // header blocks
        for (int i = 0; i < hb; i += 16) begin
          a_data = '0;
          for (int j = 0; j < 16 && i + j < hb; j++) a_data[127 - 8*j -: 8] = h[i + j];
          a_valid = 1;
          @(posedge clk);
          while (!a_ready) @(posedge clk);
          @(negedge clk);
          a_valid = 0;
        end
      end
      begin // data blocks, then the tag
        for (int i = 0; i < db; i += 16) begin
          c_data = '0;
          for (int j = 0; j < 16 && i + j < db; j++) c_data[127 - 8*j -: 8] = d[i + j];
          c_valid = 1;
          @(posedge clk);
          while (!c_ready) @(posedge clk);
          @(negedge clk);
          c_valid = 0;
        end
        repeat (3) @(negedge clk);
        tag = t; tag_valid = 1;
        @(negedge clk);
        tag_valid = 0;
      end
      begin // output
        while (!last_seen) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 2) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            for (int j = 0; j < int'(out_nbytes); j++) got.push_back(out_data[127 - 8*j -: 8]);
            last_seen = out_last;
          end
        end
      end
    join
    check(got.size() == e.size(), $sformatf("frame length %0d, expected %0d", got.size(), e.size()));
    check(got == e, $sformatf("frame content, header %0d data %0d", hb, db));
  endtask

  initial begin
    frame_start = 0; sh = '0; a_valid = 0; c_valid = 0; tag_valid = 0; out_ready = 0;
    a_data = '0; c_data = '0; tag = '0; hdr_bytes = 16'd6; data_bytes = 16'd37;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(6, 37);
    run(20, 48);
    run(6, 37);
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
