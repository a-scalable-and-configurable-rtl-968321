// Input data interface of the TM Security Module.
//
// Words of an SDL TM Transfer Frame arrive on the TM-transmitter clock,
// IN_B bytes per word, first byte most significant. Each frame is hdr_bytes
// of transfer-frame header (sent on unchanged, the associated data A of
// AES-GCM) followed by data_bytes of frame data (the plaintext), and starts
// on a fresh input word. A dual-clock FIFO carries the words into the
// security-module clock domain. There they are cut at the header/data
// boundary and regrouped into left-aligned 128-bit blocks: every segment
// starts a new block, and the last block of a segment holds only what is
// left (blk_nbytes valid bytes, the rest zero). blk_is_a tells header blocks
// from data blocks and blk_last marks the last block of a segment.
//
// hdr_bytes and data_bytes must be at least 1 and stay constant while
// frames flow. Handshakes are valid/ready on both sides.
module tm_input_if #(
  parameter int unsigned IN_B = 4,
  parameter int unsigned AW   = 3
) (
  input  logic                 clk_tm,
  input  logic                 rst_tm_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [8*IN_B-1:0]    in_data,
  input  logic                 clk_sec,
  input  logic                 rst_sec_n,
  input  logic [15:0]          hdr_bytes,
  input  logic [15:0]          data_bytes,
  output logic                 blk_valid,
  input  logic                 blk_ready,
  output logic [127:0]         blk_data,
  output logic [4:0]           blk_nbytes,
  output logic                 blk_is_a,
  output logic                 blk_last
);

  localparam int unsigned OW = $clog2(IN_B + 1);

  logic              f_valid, f_ready, p_ready, p_valid, p_flush, take;
  logic [8*IN_B-1:0] f_data, chunk;
  logic [OW-1:0]     woff_q, k;
  logic [15:0]       seg_cnt_q, seg_len, rem;
  logic              seg_c_q, out_seg_c_q;

  async_fifo #(.W(8*IN_B), .AW(AW)) u_fifo (
    .wclk(clk_tm), .wrst_n(rst_tm_n), .w_valid(in_valid), .w_ready(in_ready), .w_data(in_data),
    .rclk(clk_sec), .rrst_n(rst_sec_n), .r_valid(f_valid), .r_ready(f_ready), .r_data(f_data)
  );

  // cut the head word at the segment boundary
  assign seg_len = seg_c_q ? data_bytes : hdr_bytes;
  assign rem     = seg_len - seg_cnt_q;
  assign chunk   = f_data << (8 * woff_q);
  assign k       = (16'(IN_B) - 16'(woff_q) <= rem) ? OW'(IN_B) - woff_q : OW'(rem);
  assign p_flush = (16'(k) == rem);
  assign p_valid = f_valid;
  assign take    = p_valid && p_ready;
  // the word is used up, or the frame ends inside it
  assign f_ready = take && ((woff_q + k == OW'(IN_B)) || (p_flush && seg_c_q));

  always_ff @(posedge clk_sec or negedge rst_sec_n) begin
    if (!rst_sec_n) begin
      woff_q    <= '0;
      seg_cnt_q <= '0;
      seg_c_q   <= 1'b0;
    end else if (take) begin
      woff_q <= f_ready ? '0 : woff_q + k;
      if (p_flush) begin
        seg_cnt_q <= '0;
        seg_c_q   <= !seg_c_q;
      end else begin
        seg_cnt_q <= seg_cnt_q + 16'(k);
      end
    end
  end

  byte_packer #(.IN_B(IN_B), .OUT_B(16)) u_pack (
    .clk(clk_sec), .rst_n(rst_sec_n),
    .in_valid(p_valid), .in_ready(p_ready), .in_data(chunk), .in_nbytes(k), .in_flush(p_flush),
    .out_valid(blk_valid), .out_ready(blk_ready), .out_data(blk_data), .out_nbytes(blk_nbytes),
    .out_last(blk_last)
  );

  // segment of the block on the output
  assign blk_is_a = !out_seg_c_q;
  always_ff @(posedge clk_sec or negedge rst_sec_n) begin
    if (!rst_sec_n)                            out_seg_c_q <= 1'b0;
    else if (blk_valid && blk_ready && blk_last) out_seg_c_q <= !out_seg_c_q;
  end

endmodule
