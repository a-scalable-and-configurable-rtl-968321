// Testbench of the data synch buffer: random 128-bit blocks written and read
// with random timing must come out in order; the buffer must refuse a fifth
// block when it holds four (default depth) and must never signal valid when
// empty.
`timescale 1ns/1ps
module tb_tm_data_synch_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [127:0] in_data, out_data;
  int checks = 0, failures = 0;

  tm_data_synch_buffer u_dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [127:0] model [$];
    int nin, nout;
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!out_valid, "empty after reset");
    // fill to the top
    for (int i = 0; i < 4; i++) begin
      in_valid = 1; in_data = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(in_ready, "space for four blocks");
      model.push_back(in_data);
      @(negedge clk);
    end
    #1;
    check(!in_ready, "full after four blocks");
    in_valid = 0;
    // random traffic
    nin = 0; nout = 0;
    while (nout < 200) begin
      @(negedge clk);
      in_valid = (nin < 196) && ($urandom_range(0, 1) == 1);
      in_data = {$urandom, $urandom, $urandom, $urandom};
      out_ready = ($urandom_range(0, 1) == 1);
      #4;
      if (out_valid && out_ready) begin
        check(out_data == model[0], $sformatf("block %0d", nout));
        void'(model.pop_front());
        nout++;
      end else if (!out_valid) begin
        check(model.size() == 0, "valid while holding data");
      end
      if (in_valid && in_ready) begin
        model.push_back(in_data);
        nin++;
      end
    end
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
