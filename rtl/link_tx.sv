// link_tx: serializer for one direction of an inter-FPGA serial link.
//
// A W-bit word accepted on (in_valid && in_ready) is sent as one frame of
// W/LINK_LANES consecutive cycles. During the frame 'strobe' is high and
// each cycle carries the next LINK_LANES bits, least significant first:
// lane k carries bit (cycle*LINK_LANES + k). Between frames the link idles
// with strobe low. in_ready is high when no frame is in flight, so a new
// word is accepted the cycle after a frame's last beat and frames can be
// sent back to back with one idle cycle in between. The sender's clock
// goes out with the data as link.fclk; strobe and d change on its rising
// edge, so the receiver can sample them on the falling edge.
//
// The CONFETTI platform description gives the physical link (two data pairs plus a forwarded
// clock pair per direction, 500 Mbit/s per pair, no global clock); the framing, the
// bit order and the one-bit-per-lane-per-cycle rate are this design's own.
module link_tx
  import confetti_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output link_t        link
);
  localparam int unsigned BEATS = W / LINK_LANES;
  localparam int unsigned CW    = $clog2(BEATS + 1);

  logic [W-1:0]  shreg;
  logic [CW-1:0] beats_left;
  logic                  strobe_q;
  logic [LINK_LANES-1:0] d_q;

  assign link = '{fclk: clk, strobe: strobe_q, d: d_q};

  initial begin
    assert (W % LINK_LANES == 0) else $error("link_tx: W must be a multiple of LINK_LANES");
  end

  assign in_ready = (beats_left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      beats_left <= '0;
      strobe_q   <= 1'b0;
      d_q        <= '0;
    end else if (beats_left != '0) begin
      strobe_q   <= 1'b1;
      d_q        <= shreg[LINK_LANES-1:0];
      shreg      <= shreg >> LINK_LANES;
      beats_left <= beats_left - 1'b1;
    end else begin
      strobe_q <= 1'b0;
      d_q      <= '0;
      if (in_valid) begin
        shreg      <= in_data;
        beats_left <= CW'(BEATS);
      end
    end
  end

endmodule
