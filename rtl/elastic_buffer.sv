// elastic_buffer: dual-clock buffer between the received reference clock
// and the receiver's own clock (source-synchronous method).
//
// Sender and receiver run from different clock sources of the same nominal
// frequency, so the received words arrive on `wclk` (the forwarded
// reference clock) while the node consumes them on `rclk`. Words written
// with `wvalid` go into a DEPTH-entry ring; the pointers cross clock domains
// as Gray codes through two-flop synchronizers. Reading starts once the
// read side sees START_LEVEL words. Each side sees the other's pointer about
// 2-3 cycles late, so the real fill is then about START_LEVEL + 3 and the
// write side sees about START_LEVEL + 5; the default START_LEVEL = DEPTH/2 - 3
// keeps both views near the middle. From then on one word is read every
// `rclk` cycle while words are present, so the fill level can wander either
// way to absorb jitter and the clock-rate difference. `rvalid`
// marks a word on `rdata`, one cycle after it was read. `overflow`
// (write side) and `underflow` (read side, after start) are sticky error
// flags. The standard only says an elastic buffer absorbs the jitter; the
// structure, depth and start rule are this design's own.
`timescale 1ps / 1ps
module elastic_buffer #(
  parameter int WIDTH = 17,
  parameter int DEPTH = 16,
  parameter int START_LEVEL = DEPTH / 2 - 3,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wvalid,
  input  logic [WIDTH-1:0] wdata,
  output logic             overflow,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             rvalid,
  output logic [WIDTH-1:0] rdata,
  output logic             underflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r1, wgray_r2, rgray_w1, rgray_w2;
  logic [AW:0] wbin_r, rbin_w, fill_w, fill_r;
  logic        started;

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Write side.
  assign rbin_w = gray2bin(rgray_w2);
  assign fill_w = wbin - rbin_w;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wvalid) begin
        if (fill_w == (AW+1)'(DEPTH)) begin
          overflow <= 1'b1;
        end else begin
          wbin  <= wbin + 1'b1;
          wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
        end
      end
    end
  end

  always_ff @(posedge wclk)
    if (wvalid && fill_w != (AW+1)'(DEPTH)) mem[wbin[AW-1:0]] <= wdata;

  // Read side.
  assign wbin_r = gray2bin(wgray_r2);
  assign fill_r = wbin_r - rbin;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
      started <= 1'b0; rvalid <= 1'b0; rdata <= '0; underflow <= 1'b0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      rvalid <= 1'b0;
      if (!started) begin
        started <= fill_r >= (AW+1)'(START_LEVEL);
      end else if (fill_r != '0) begin
        rdata  <= mem[rbin[AW-1:0]];
        rvalid <= 1'b1;
        rbin   <= rbin + 1'b1;
        rgray  <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
      end else begin
        underflow <= 1'b1;
      end
    end
  end

endmodule
