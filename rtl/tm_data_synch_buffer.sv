// Data synch buffer of the TM Security Module.
//
// A small first-in first-out store for the 128-bit header blocks (the
// associated data A) of the frame being protected. They are written while
// the AES-GCM module takes them in and read by the output data handler when
// it rebuilds the frame, so that the header leaves the module unchanged and
// in step with the encrypted data. First-word-fall-through, valid/ready on
// both sides; 2^AW blocks deep (one frame header of up to 64 bytes with the
// default AW = 2).
module tm_data_synch_buffer #(
  parameter int unsigned AW = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [127:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [127:0] out_data
);

  logic [127:0] mem [2**AW];
  logic [AW:0]  wp_q, rp_q, count;
  logic         wr, rd;

  assign count     = wp_q - rp_q;
  assign in_ready  = (count != (AW+1)'(2**AW));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp_q[AW-1:0]];
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (wr) wp_q <= wp_q + 1'b1;
      if (rd) rp_q <= rp_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wp_q[AW-1:0]] <= in_data;
  end

endmodule
