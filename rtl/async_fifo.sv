// Dual-clock FIFO with Gray-coded pointers, used where data crosses between
// the TM transmitter clock and the security-module clock.
//
// Write side (wclk): w_valid/w_ready, data is written when both are 1.
// Read side (rclk): r_valid/r_ready with first-word-fall-through: r_data is
// the oldest word whenever r_valid is 1. Each pointer is passed to the other
// domain in Gray code through a two-flop synchronizer, so the full and empty
// flags are conservative by two cycles of the other clock. With both clocks
// tied together it works as an ordinary FIFO. DEPTH = 2^AW words.
module async_fifo #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 3
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         w_valid,
  output logic         w_ready,
  input  logic [W-1:0] w_data,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         r_valid,
  input  logic         r_ready,
  output logic [W-1:0] r_data
);

  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign w_ready = (wgray_q != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n  = wbin_q + (AW+1)'(w_valid && w_ready);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin_q   <= wbin_n;
      wgray_q  <= bin2gray(wbin_n);
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (w_valid && w_ready) mem[wbin_q[AW-1:0]] <= w_data;
  end

  // read domain
  assign r_valid = (rgray_q != wgray_r2);
  assign r_data  = mem[rbin_q[AW-1:0]];
  assign rbin_n  = rbin_q + (AW+1)'(r_valid && r_ready);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin_q   <= rbin_n;
      rgray_q  <= bin2gray(rbin_n);
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
