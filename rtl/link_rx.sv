// link_rx: deserializer for one direction of an inter-FPGA serial link,
// with the crossing from the sender's clock into the receiver's.
//
// The bits are taken in the sender's clock domain: on each falling edge of
// the forwarded clock link.fclk, while 'strobe' is high, LINK_LANES bits
// are shifted in (least significant first, lane k = bit beat*LINK_LANES+k,
// as link_tx sends them). When W bits have arrived the word is written
// into a small asynchronous FIFO. On the receiver's own clk the FIFO is
// emptied one word per cycle: each word appears on out_data with a
// one-cycle out_valid pulse. A frame cut short by strobe going low is
// dropped and the next strobe starts a new frame.
//
// Timing: out_valid rises two to four receiver clock cycles after the
// frame's last beat. The receiver always pops at once, so the FIFO
// (four words) only has to absorb the crossing itself.
//
// The platform description gives the lanes (a forwarded clock pair plus
// D0 and D1) and the lack of a global clock; the framing, the sampling
// edge and the FIFO are this design's own.
module link_rx
  import confetti_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  link_t        link,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  localparam int unsigned BEATS = W / LINK_LANES;
  localparam int unsigned CW    = $clog2(BEATS + 1);

  logic          fclk;
  logic [W-1:0]  shreg;
  logic [CW-1:0] beats;
  logic          wr_en;
  logic [W-1:0]  wr_data;
  logic          rd_empty;
  logic [W-1:0]  rd_data;

  assign fclk = link.fclk;

  // ---- sender's clock domain (falling edge of the forwarded clock) ----
  always_ff @(negedge fclk or negedge rst_n) begin
    if (!rst_n) begin
      shreg   <= '0;
      beats   <= '0;
      wr_en   <= 1'b0;
      wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (link.strobe) begin
        // New bits enter at the top; after BEATS beats the first bits sit at the bottom.
        shreg <= {link.d, shreg[W-1:LINK_LANES]};
        if (beats == CW'(BEATS - 1)) begin
          beats   <= '0;
          wr_en   <= 1'b1;
          wr_data <= {link.d, shreg[W-1:LINK_LANES]};
        end else begin
          beats <= beats + 1'b1;
        end
      end else begin
        beats <= '0;
      end
    end
  end

  // The FIFO's write side runs on the inverted forwarded clock, so that its
  // rising edge is the falling edge used above.
  async_fifo #(.W(W), .DEPTH(4)) u_fifo (
    .rst_n,
    .wclk     (!fclk),
    .wr_en,
    .wr_data,
    .wr_full  (),
    .rclk     (clk),
    .rd_en    (!rd_empty),
    .rd_data,
    .rd_empty
  );

  // ---- receiver's clock domain ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= !rd_empty;
      if (!rd_empty) out_data <= rd_data;
    end
  end

endmodule
