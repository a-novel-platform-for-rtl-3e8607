// display_tile: the 8 x 8 square of 24-bit RGB pixels that one ECell owns
// on the EDisplay board, as a small dual-port pixel memory.
//
// The ECell writes one pixel per cycle (we, waddr, wdata) on its own
// clock wclk; the display side reads one pixel per cycle at raddr on its
// clock rclk, with the data on rdata one rclk cycle later. The two clocks
// may be unrelated: a pixel read while it is being rewritten may show the
// old or the new colour. Address = y*N + x, y = 0 at the north edge. Pixels are
// 24-bit {R[7:0], G[7:0], B[7:0]}. The memory is not reset: it is written
// before it is shown.
//
// The CONFETTI platform description gives the 24-bit RGB display, the 8 x 8 square directly
// above each ECell and that each ECell reaches only its own square; the
// dual-port memory and pixel format are this design's own. How the
// EDisplay board scans its LEDs is not described and is left outside.
module display_tile #(
  parameter int unsigned N = 8,
  parameter int unsigned AW = $clog2(N*N)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [23:0]   wdata,
  input  logic          rclk,
  input  logic [AW-1:0] raddr,
  output logic [23:0]   rdata
);
  logic [23:0] mem [N*N];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end

endmodule
