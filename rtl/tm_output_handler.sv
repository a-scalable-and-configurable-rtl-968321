// Output data handler of the TM Security Module: assembles the SDLS TM
// Transfer Frame.
//
// For each frame it sends, byte-contiguous, the transfer-frame header taken
// from the data synch buffer (hdr_bytes), the Security Header SPI || IV
// (16 + 96 bits = 14 bytes, taken when frame_start is pulsed), the frame
// data encrypted by the AES-GCM module (data_bytes) and the 128-bit MAC as
// Security Trailer (16 bytes). The pieces are fed one after the other into a
// byte packer, so the output is a stream of 128-bit words, first byte most
// significant; the last word of a frame carries out_last and may be partial
// (out_nbytes valid bytes).
//
// frame_start is accepted only while ready_frame = 1. The MAC is captured
// from tag/tag_valid whenever it arrives. Handshakes are valid/ready.
module tm_output_handler (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  hdr_bytes,
  input  logic [15:0]  data_bytes,
  input  logic         frame_start,
  input  logic [111:0] sh,
  output logic         ready_frame,
  input  logic         a_valid,
  output logic         a_ready,
  input  logic [127:0] a_data,
  input  logic         c_valid,
  output logic         c_ready,
  input  logic [127:0] c_data,
  input  logic         tag_valid,
  input  logic [127:0] tag,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [127:0] out_data,
  output logic [4:0]   out_nbytes,
  output logic         out_last
);

  typedef enum logic [2:0] {H_IDLE, H_HDR, H_SH, H_DATA, H_MAC} hstate_e;

  hstate_e      state_q;
  logic [111:0] sh_q;
  logic [127:0] tag_q, p_data;
  logic         tag_have_q, p_valid, p_ready, p_flush, take;
  logic [15:0]  cnt_q, rem;
  logic [4:0]   p_k;

  assign ready_frame = (state_q == H_IDLE);
  assign rem         = ((state_q == H_HDR) ? hdr_bytes : data_bytes) - cnt_q;
  assign take        = p_valid && p_ready;

  always_comb begin
    p_valid = 1'b0;
    p_data  = a_data;
    p_k     = (rem >= 16'd16) ? 5'd16 : rem[4:0];
    p_flush = 1'b0;
    a_ready = 1'b0;
    c_ready = 1'b0;
    unique case (state_q)
      H_HDR: begin
        p_valid = a_valid;
        a_ready = p_ready;
      end
      H_SH: begin
        p_valid = 1'b1;
        p_data  = {sh_q, 16'h0000};
        p_k     = 5'd14;
      end
      H_DATA: begin
        p_valid = c_valid;
        p_data  = c_data;
        c_ready = p_ready;
      end
      H_MAC: begin
        p_valid = tag_have_q;
        p_data  = tag_q;
        p_k     = 5'd16;
        p_flush = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= H_IDLE;
      cnt_q      <= '0;
      tag_have_q <= 1'b0;
    end else begin
      if (tag_valid) tag_have_q <= 1'b1;
      unique case (state_q)
        H_IDLE: if (frame_start) begin
          state_q <= H_HDR;
          cnt_q   <= '0;
        end
        H_HDR: if (take) begin
          cnt_q <= cnt_q + 16'(p_k);
          if (16'(p_k) == rem) begin
            cnt_q   <= '0;
            state_q <= H_SH;
          end
        end
        H_SH: if (take) state_q <= H_DATA;
        H_DATA: if (take) begin
          cnt_q <= cnt_q + 16'(p_k);
          if (16'(p_k) == rem) state_q <= H_MAC;
        end
        H_MAC: if (take) begin
          tag_have_q <= tag_valid;
          state_q    <= H_IDLE;
        end
        default: state_q <= H_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == H_IDLE && frame_start) sh_q <= sh;
    if (tag_valid) tag_q <= tag;
  end

  byte_packer #(.IN_B(16), .OUT_B(16)) u_pack (
    .clk(clk), .rst_n(rst_n),
    .in_valid(p_valid), .in_ready(p_ready), .in_data(p_data), .in_nbytes(p_k), .in_flush(p_flush),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_nbytes(out_nbytes),
    .out_last(out_last)
  );

endmodule
