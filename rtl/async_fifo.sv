// async_fifo: a small dual-clock FIFO for crossing between unrelated clocks.
//
// Words are written on wclk and read on rclk. Both pointers count in Gray
// code and cross to the other side through two-flop synchronisers, so at
// most one pointer bit changes at a time and a half-seen update can only
// make the FIFO look fuller (to the writer) or emptier (to the reader)
// than it is, never the reverse. DEPTH must be a power of two, at least 4.
// Write: wr_en when !wr_full. Read: rd_data shows the head word whenever
// !rd_empty; rd_en pops it. A word becomes visible to the reader three
// rclk edges after it was written, at most.
// Standard construction; the crossing itself is needed because every
// ECell of the machine runs from its own oscillator.
module async_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 4
) (
  input  logic         rst_n,
  // write side
  input  logic         wclk,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_full,
  // read side
  input  logic         rclk,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer in the read domain
  logic [AW:0]  wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  initial begin
    assert (DEPTH == 2**AW && DEPTH >= 4) else $error("async_fifo: DEPTH must be a power of two, at least 4");
  end

  // ---- write side ----
  assign wbin_nx = wbin + (AW+1)'(wr_en && !wr_full);
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---- read side ----
  assign rbin_nx  = rbin + (AW+1)'(rd_en && !rd_empty);
  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
