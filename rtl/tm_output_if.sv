// Output data interface of the TM Security Module: a dual-clock FIFO back
// to the TM-transmitter clock and a parallel-in serial-out (PISO) stage.
//
// 128-bit words of the SDLS frame (with their count of valid leading bytes
// and an end-of-frame flag) cross into the TM clock domain through the FIFO.
// The PISO then sends each word OUT_B bytes at a time, first byte most
// significant, on data_out. data_keep has one bit per byte (the most
// significant bit for the first byte) telling which bytes are valid, and
// data_last marks the last beat of a frame. One beat per TM clock cycle
// while data_ready is 1. OUT_B must divide 16.
module tm_output_if #(
  parameter int unsigned OUT_B = 4,
  parameter int unsigned AW    = 3
) (
  input  logic               clk_sec,
  input  logic               rst_sec_n,
  input  logic               w_valid,
  output logic               w_ready,
  input  logic [127:0]       w_data,
  input  logic [4:0]         w_nbytes,
  input  logic               w_last,
  input  logic               clk_tm,
  input  logic               rst_tm_n,
  output logic               data_valid,
  input  logic               data_ready,
  output logic [8*OUT_B-1:0] data_out,
  output logic [OUT_B-1:0]   data_keep,
  output logic               data_last
);

  logic         f_valid, f_ready, f_last;
  logic [127:0] f_data, sr_q;
  logic [4:0]   f_nbytes, left_q;
  logic         busy_q, last_q;

  async_fifo #(.W(134), .AW(AW)) u_fifo (
    .wclk(clk_sec), .wrst_n(rst_sec_n), .w_valid(w_valid), .w_ready(w_ready),
    .w_data({w_last, w_nbytes, w_data}),
    .rclk(clk_tm), .rrst_n(rst_tm_n), .r_valid(f_valid), .r_ready(f_ready),
    .r_data({f_last, f_nbytes, f_data})
  );

  assign f_ready    = !busy_q;
  assign data_valid = busy_q;
  assign data_out   = sr_q[127 -: 8*OUT_B];
  assign data_last  = last_q && (left_q <= 5'(OUT_B));

  always_comb begin
    for (int i = 0; i < int'(OUT_B); i++)
      data_keep[OUT_B-1-i] = (5'(i) < left_q);
  end

  always_ff @(posedge clk_tm or negedge rst_tm_n) begin
    if (!rst_tm_n) begin
      busy_q <= 1'b0;
      left_q <= '0;
      last_q <= 1'b0;
    end else if (!busy_q) begin
      if (f_valid) begin
        busy_q <= (f_nbytes != '0);
        left_q <= f_nbytes;
        last_q <= f_last;
      end
    end else if (data_ready) begin
      if (left_q <= 5'(OUT_B)) begin
        busy_q <= 1'b0;
        left_q <= '0;
      end else begin
        left_q <= left_q - 5'(OUT_B);
      end
    end
  end

  always_ff @(posedge clk_tm) begin
    if (!busy_q && f_valid)   sr_q <= f_data;
    else if (busy_q && data_ready) sr_q <= sr_q << (8 * OUT_B);
  end

endmodule
