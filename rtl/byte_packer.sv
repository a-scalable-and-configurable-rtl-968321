// Byte packer: collects chunks of 1..IN_B bytes into words of OUT_B bytes.
//
// Bytes are kept in arrival order, first byte in the most significant
// position of both in_data and out_data. A word leaves as soon as OUT_B bytes
// are present. A chunk marked in_flush closes a group (a segment or a frame):
// after it, the bytes still held leave as a shorter word with out_last = 1
// and out_nbytes giving how many leading bytes are valid (unused bytes are
// zero). The next group then starts at the first byte of a new word; this is
// how the interfaces of the TM Security Module byte-align data.
//
// Handshakes: in_valid/in_ready and out_valid/out_ready; a chunk can enter in
// the cycle a word leaves. IN_B must not exceed OUT_B.
module byte_packer #(
  parameter int unsigned IN_B  = 4,
  parameter int unsigned OUT_B = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [8*IN_B-1:0]    in_data,
  input  logic [$clog2(IN_B+1)-1:0] in_nbytes,
  input  logic                 in_flush,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [8*OUT_B-1:0]   out_data,
  output logic [$clog2(OUT_B+1)-1:0] out_nbytes,
  output logic                 out_last
);

  localparam int unsigned BUF_B = OUT_B + IN_B;
  localparam int unsigned CW    = $clog2(BUF_B + 1);

  logic [7:0]    buf_q [BUF_B];
  logic [7:0]    buf_n [BUF_B];
  logic [CW-1:0] cnt_q, cnt_n, base;
  logic          flush_q, flush_n, emit, take;

  if (IN_B > OUT_B) begin : g_bad
    $error("byte_packer: IN_B must not exceed OUT_B");
  end

  assign out_valid  = (cnt_q >= CW'(OUT_B)) || (flush_q && cnt_q != '0);
  assign out_last   = flush_q && (cnt_q <= CW'(OUT_B));
  assign out_nbytes = (cnt_q >= CW'(OUT_B)) ? ($clog2(OUT_B+1))'(OUT_B) : ($clog2(OUT_B+1))'(cnt_q);
  assign emit       = out_valid && out_ready;
  assign in_ready   = !flush_q && ((cnt_q < CW'(OUT_B)) || emit);
  assign take       = in_valid && in_ready;

  always_comb begin
    for (int i = 0; i < int'(OUT_B); i++)
      out_data[8*(OUT_B-1-i) +: 8] = (CW'(i) < cnt_q) ? buf_q[i] : 8'h00;
  end

  always_comb begin
    // drop the word that leaves
    for (int i = 0; i < int'(BUF_B); i++) buf_n[i] = buf_q[i];
    cnt_n   = cnt_q;
    flush_n = flush_q;
    if (emit) begin
      for (int i = 0; i < int'(BUF_B); i++)
        buf_n[i] = (i + int'(OUT_B) < int'(BUF_B)) ? buf_q[i + int'(OUT_B)] : 8'h00;
      if (out_last) begin
        cnt_n   = '0;
        flush_n = 1'b0;
      end else begin
        cnt_n = cnt_q - CW'(OUT_B);
      end
    end
    base = cnt_n;
    // append the chunk
    if (take) begin
      for (int i = 0; i < int'(IN_B); i++)
        if (i < int'(in_nbytes)) buf_n[int'(base) + i] = in_data[8*(IN_B-1-i) +: 8];
      cnt_n   = base + CW'(in_nbytes);
      flush_n = in_flush;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      flush_q <= 1'b0;
    end else begin
      cnt_q   <= cnt_n;
      flush_q <= flush_n;
    end
  end

  always_ff @(posedge clk) begin
    buf_q <= buf_n;
  end

endmodule
