// Configuration/Status block of the TM Security Module.
//
// Holds, in the TM-transmitter clock domain, the parameters of the security
// association and of the frame format, written through a simple register
// port (cfg_we, cfg_addr, cfg_wdata, 32-bit words):
//   0      control: bit 0 = enable
//   1      SPI (bits 15:0)
//   2..4   initial IV, most significant word first
//   5..12  256-bit key K, most significant word first
//   13     header length in bytes (associated data A)
//   14     frame-data length in bytes (encrypted part C)
// The values are meant to be changed only while enable is 0; they are then
// used unsynchronised by the security-module clock domain, while enable
// itself passes through a two-flop synchronizer there. The block derives
// len(A) || len(C) in bits for the AES-GCM module and counts the frames sent
// (frame_done_tgl toggles once per frame in the security-module domain and is
// synchronised here) for the status output.
module tm_config_status (
  input  logic         clk_tm,
  input  logic         rst_tm_n,
  input  logic         cfg_we,
  input  logic [3:0]   cfg_addr,
  input  logic [31:0]  cfg_wdata,
  input  logic         frame_done_tgl,
  output logic         enable,
  output logic [15:0]  spi,
  output logic [95:0]  iv_init,
  output logic [255:0] key,
  output logic [15:0]  hdr_bytes,
  output logic [15:0]  data_bytes,
  output logic [127:0] lens,
  output logic [31:0]  status_frames
);

  logic [2:0] tgl_sync_q;

  always_ff @(posedge clk_tm or negedge rst_tm_n) begin
    if (!rst_tm_n) begin
      enable     <= 1'b0;
      spi        <= '0;
      iv_init    <= '0;
      key        <= '0;
      hdr_bytes  <= 16'd6;
      data_bytes <= 16'd16;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        4'd0:  enable     <= cfg_wdata[0];
        4'd1:  spi        <= cfg_wdata[15:0];
        4'd2:  iv_init[95:64] <= cfg_wdata;
        4'd3:  iv_init[63:32] <= cfg_wdata;
        4'd4:  iv_init[31:0]  <= cfg_wdata;
        4'd13: hdr_bytes  <= cfg_wdata[15:0];
        4'd14: data_bytes <= cfg_wdata[15:0];
        4'd15: ;
        default: key[255 - 32*(int'(cfg_addr) - 5) -: 32] <= cfg_wdata;
      endcase
    end
  end

  assign lens = {45'b0, hdr_bytes, 3'b000, 45'b0, data_bytes, 3'b000};

  always_ff @(posedge clk_tm or negedge rst_tm_n) begin
    if (!rst_tm_n) begin
      tgl_sync_q    <= '0;
      status_frames <= '0;
    end else begin
      tgl_sync_q <= {tgl_sync_q[1:0], frame_done_tgl};
      if (tgl_sync_q[2] != tgl_sync_q[1]) status_frames <= status_frames + 32'd1;
    end
  end

endmodule
