// Testbench of the TM output interface: 128-bit words with byte counts and
// end-of-frame flags are written on the security clock (3.6 ns) and must
// come out on the TM clock (10 ns) as 4-byte beats carrying the same bytes
// in order, with data_keep marking the valid bytes and data_last on the
// final beat of each frame. Random back-pressure on both sides.
`timescale 1ns/100ps
module tb_tm_output_if;
  logic clk_tm = 0, clk_sec = 0, rst_tm_n = 0, rst_sec_n = 0;
  always #5.0 clk_tm = ~clk_tm;
  always #1.8 clk_sec = ~clk_sec;

  logic w_valid, w_ready, w_last, data_valid, data_ready, data_last;
  logic [127:0] w_data;
  logic [4:0] w_nbytes;
  logic [31:0] data_out;
  logic [3:0] data_keep;
  int checks = 0, failures = 0;

  tm_output_if u_dut (
    .clk_sec(clk_sec), .rst_sec_n(rst_sec_n), .w_valid(w_valid), .w_ready(w_ready),
    .w_data(w_data), .w_nbytes(w_nbytes), .w_last(w_last),
    .clk_tm(clk_tm), .rst_tm_n(rst_tm_n), .data_valid(data_valid), .data_ready(data_ready),
    .data_out(data_out), .data_keep(data_keep), .data_last(data_last));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned exp_bytes [$];
  int exp_lasts [$];   // index of the last byte of each frame

  initial begin
    int nwords [4] = '{3, 1, 5, 2};
    int lastn [4] = '{16, 7, 13, 3};
    int total, got, frame;
    byte unsigned b;
    w_valid = 0; w_data = '0; w_nbytes = '0; w_last = 0; data_ready = 0;
    total = 0;
    for (int f = 0; f < 4; f++) begin
      total += 16 * (nwords[f] - 1) + lastn[f];
      exp_lasts.push_back(total - 1);
    end
    repeat (3) @(negedge clk_tm);
    rst_tm_n = 1; rst_sec_n = 1;
    fork
      begin
        for (int f = 0; f < 4; f++)
          for (int w = 0; w < nwords[f]; w++) begin
            @(negedge clk_sec);
            while ($urandom_range(0, 2) == 0) @(negedge clk_sec);
            w_nbytes = (w == nwords[f] - 1) ? 5'(lastn[f]) : 5'd16;
            w_last = (w == nwords[f] - 1);
            w_data = '0;
            for (int j = 0; j < int'(w_nbytes); j++) begin
              b = byte'($urandom);
              w_data[127 - 8*j -: 8] = b;
              exp_bytes.push_back(b);
            end
            w_valid = 1;
            @(posedge clk_sec);
            while (!w_ready) @(posedge clk_sec);
            @(negedge clk_sec);
            w_valid = 0;
          end
      end
      begin
        got = 0; frame = 0;
        while (got < total) begin
          @(negedge clk_tm);
          data_ready = ($urandom_range(0, 3) != 0);
          @(posedge clk_tm);
          if (data_valid && data_ready) begin
            for (int j = 0; j < 4; j++)
              if (data_keep[3 - j]) begin
                check(data_out[31 - 8*j -: 8] == exp_bytes[got], $sformatf("byte %0d", got));
                got++;
              end
            check(data_last == (got - 1 == exp_lasts[frame]), $sformatf("data_last at byte %0d", got - 1));
            if (data_last) frame++;
          end
        end
        check(frame == 4, "four frames");
      end
    join
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
