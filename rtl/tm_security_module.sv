// TM Security Module: turns SDL TM Transfer Frames into SDLS TM Transfer
// Frames protected by AES-256-GCM (the CCSDS baseline mode for TM: a Security
// Header of SPI and IV, encrypted frame data, and a 128-bit MAC as Security
// Trailer).
//
// Data path: the input interface (dual-clock FIFO and byte aligner) splits
// each frame into the transfer-frame header, which is the associated data A,
// and the frame data, and packs both into 128-bit blocks. Header blocks go to
// the AES-GCM module and, unchanged, to the data synch buffer; data blocks go
// to the AES-GCM module only. The output data handler writes header, SPI||IV,
// ciphertext and MAC one after the other into 128-bit words, which the output
// interface (dual-clock FIFO and PISO) sends back in the TM clock domain.
// The configuration/status block supplies K, SPI, IV, the lengths and
// len(A)||len(C); a frame sequencer starts one AES-GCM message per frame
// as soon as the frame's first header block is waiting,
// using the configured IV for the first frame after enable and adding 1 to it
// for every further frame, so that no IV is used twice.
//
// Two clocks: clk_tm for the TM transmitter side (data_in, data_out, cfg,
// status) and clk_sec for the security module; they may be the same clock
// (single-clock use) or unrelated (multi-clock use). The defaults configure
// AES-GCM as for the multi-clock use: one AES stage, LUT S-boxes, multi-cycle
// KOA-2 GHASH multiplier and no decryption logic. GH_UNITS > 1 selects the
// GHASH with parallel multipliers, for the faster AES configurations.
//
// data_in: IN_B bytes per beat, first byte most significant, every frame
// starting on a new beat (unused bytes of its last beat are dropped).
// data_out: OUT_B bytes per beat with data_keep (one bit per byte) and
// data_last on the last beat of a frame. All streams are valid/ready.
module tm_security_module
  import aes_gcm_pkg::*;
#(
  parameter int unsigned N          = 1,
  parameter sbox_impl_e  SBOX       = SBOX_LUT,
  parameter bit          GLOBAL_KEU = 1'b0,
  parameter mult_impl_e  MULT       = MULT_MULTI,
  parameter int unsigned KOA        = 2,
  parameter bit          DECRYPT_EN = 1'b0,
  parameter int unsigned GH_UNITS   = 1,
  parameter int unsigned IN_B       = 4,
  parameter int unsigned OUT_B      = 4
) (
  input  logic               clk_tm,
  input  logic               rst_tm_n,
  input  logic               clk_sec,
  input  logic               rst_sec_n,
  // SDL TM Transfer Frames in
  input  logic               data_in_valid,
  output logic               data_in_ready,
  input  logic [8*IN_B-1:0]  data_in,
  // SDLS TM Transfer Frames out
  output logic               data_out_valid,
  input  logic               data_out_ready,
  output logic [8*OUT_B-1:0] data_out,
  output logic [OUT_B-1:0]   data_out_keep,
  output logic               data_out_last,
  // configuration / status
  input  logic               cfg_we,
  input  logic [3:0]         cfg_addr,
  input  logic [31:0]        cfg_wdata,
  output logic [31:0]        status_frames,
  output logic               status_enabled
);

  // configuration (TM clock domain, quasi-static)
  logic         enable;
  logic [15:0]  spi, hdr_bytes, data_bytes;
  logic [95:0]  iv_init;
  logic [255:0] key;
  logic [127:0] lens;
  logic         frame_done_tgl_q;

  tm_config_status u_cfg (
    .clk_tm(clk_tm), .rst_tm_n(rst_tm_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_wdata(cfg_wdata), .frame_done_tgl(frame_done_tgl_q), .enable(enable), .spi(spi),
    .iv_init(iv_init), .key(key), .hdr_bytes(hdr_bytes), .data_bytes(data_bytes),
    .lens(lens), .status_frames(status_frames)
  );
  assign status_enabled = enable;

  // input interface
  logic         blk_valid, blk_ready, blk_is_a, blk_last;
  logic [127:0] blk_data;
  logic [4:0]   blk_nbytes;

  tm_input_if #(.IN_B(IN_B)) u_in (
    .clk_tm(clk_tm), .rst_tm_n(rst_tm_n), .in_valid(data_in_valid), .in_ready(data_in_ready),
    .in_data(data_in), .clk_sec(clk_sec), .rst_sec_n(rst_sec_n), .hdr_bytes(hdr_bytes),
    .data_bytes(data_bytes), .blk_valid(blk_valid), .blk_ready(blk_ready), .blk_data(blk_data),
    .blk_nbytes(blk_nbytes), .blk_is_a(blk_is_a), .blk_last(blk_last)
  );

  // frame sequencer (security clock domain)
  logic [1:0]  en_sync_q;
  logic        en_sec, gcm_idle, gcm_start, h_ready_frame;
  logic [95:0] iv_q;

  always_ff @(posedge clk_sec or negedge rst_sec_n) begin
    if (!rst_sec_n) en_sync_q <= '0;
    else            en_sync_q <= {en_sync_q[0], enable};
  end
  assign en_sec    = en_sync_q[1];
  // a frame starts when its first header block is waiting at the input
  assign gcm_start = en_sec && gcm_idle && h_ready_frame && blk_valid && blk_is_a;

  always_ff @(posedge clk_sec) begin
    if (!en_sec)        iv_q <= iv_init;
    else if (gcm_start) iv_q <= iv_q + 96'd1;
  end

  // AES-GCM module
  logic         a_valid, a_ready, d_valid, d_ready, o_valid, o_ready, o_last;
  logic         tag_valid, mac_match;
  logic [127:0] o_data, tag;
  logic         sb_in_valid, sb_in_ready, sb_out_valid, sb_out_ready;
  logic [127:0] sb_out_data;

  assign a_valid     = blk_valid && blk_is_a && sb_in_ready;
  assign sb_in_valid = blk_valid && blk_is_a && a_ready;
  assign d_valid     = blk_valid && !blk_is_a;
  assign blk_ready   = blk_is_a ? (a_ready && sb_in_ready) : d_ready;

  aes_gcm #(.N(N), .SBOX(SBOX), .GLOBAL_KEU(GLOBAL_KEU), .MULT(MULT), .KOA(KOA),
            .DECRYPT_EN(DECRYPT_EN), .GH_UNITS(GH_UNITS)) u_gcm (
    .clk(clk_sec), .rst_n(rst_sec_n), .start(gcm_start), .key(key), .iv(iv_q),
    .len_a(lens[127:64]), .len_c(lens[63:0]), .decrypt(1'b0), .mac('0), .idle(gcm_idle),
    .a_valid(a_valid), .a_ready(a_ready), .a_data(blk_data),
    .d_valid(d_valid), .d_ready(d_ready), .d_data(blk_data),
    .o_valid(o_valid), .o_ready(o_ready), .o_data(o_data), .o_last(o_last),
    .tag_valid(tag_valid), .tag(tag), .mac_match(mac_match)
  );

  // data synch buffer: header blocks kept for the output frame
  tm_data_synch_buffer u_sync (
    .clk(clk_sec), .rst_n(rst_sec_n), .in_valid(sb_in_valid), .in_ready(sb_in_ready),
    .in_data(blk_data), .out_valid(sb_out_valid), .out_ready(sb_out_ready),
    .out_data(sb_out_data)
  );

  // output data handler
  logic         w_valid, w_ready, w_last;
  logic [127:0] w_data;
  logic [4:0]   w_nbytes;

  tm_output_handler u_out_h (
    .clk(clk_sec), .rst_n(rst_sec_n), .hdr_bytes(hdr_bytes), .data_bytes(data_bytes),
    .frame_start(gcm_start), .sh({spi, iv_q}), .ready_frame(h_ready_frame),
    .a_valid(sb_out_valid), .a_ready(sb_out_ready), .a_data(sb_out_data),
    .c_valid(o_valid), .c_ready(o_ready), .c_data(o_data),
    .tag_valid(tag_valid), .tag(tag),
    .out_valid(w_valid), .out_ready(w_ready), .out_data(w_data), .out_nbytes(w_nbytes),
    .out_last(w_last)
  );

  always_ff @(posedge clk_sec or negedge rst_sec_n) begin
    if (!rst_sec_n)                        frame_done_tgl_q <= 1'b0;
    else if (w_valid && w_ready && w_last) frame_done_tgl_q <= !frame_done_tgl_q;
  end

  // output interface
  tm_output_if #(.OUT_B(OUT_B)) u_out_if (
    .clk_sec(clk_sec), .rst_sec_n(rst_sec_n), .w_valid(w_valid), .w_ready(w_ready),
    .w_data(w_data), .w_nbytes(w_nbytes), .w_last(w_last),
    .clk_tm(clk_tm), .rst_tm_n(rst_tm_n), .data_valid(data_out_valid),
    .data_ready(data_out_ready), .data_out(data_out), .data_keep(data_out_keep),
    .data_last(data_out_last)
  );

  logic unused;
  assign unused = ^{blk_nbytes, blk_last, o_last, mac_match};

endmodule
