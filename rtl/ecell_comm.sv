// ecell_comm: the ECell side of the communication module.
//
// The application hands over four WORD_W-bit words, one per cardinal
// direction, with a one-cycle 'start' (accepted when 'ready' is high).
// They are multiplexed into one frame of NDIR*WORD_W bits on the
// ECell-to-ERouting link (word of direction d in bits [d*WORD_W +: WORD_W]).
// The ERouting FPGA answers with one frame holding the four words received
// from the neighbouring ECells; they appear on in_word with a one-cycle
// 'done' pulse and stay there until the next answer.
//
// The CONFETTI platform description gives the interface (64-bit input and output buses in the
// four cardinal directions, multiplexed on the available wires); the frame
// layout and the start/ready/done handshake are this design's own.
// Timing: the outgoing frame takes NDIR*WORD_W/LINK_LANES = 128 link cycles.
module ecell_comm
  import confetti_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // application side
  input  logic                          start,
  output logic                          ready,
  input  logic [NDIR-1:0][WORD_W-1:0]   out_word,
  output logic                          done,
  output logic [NDIR-1:0][WORD_W-1:0]   in_word,
  // link to / from the ERouting FPGA below
  output link_t                         link_up,
  input  link_t                         link_down
);
  localparam int unsigned FW = NDIR * WORD_W;

  logic          rx_valid;
  logic [FW-1:0] rx_data;

  link_tx #(.W(FW)) u_tx (
    .clk, .rst_n,
    .in_valid (start),
    .in_ready (ready),
    .in_data  (out_word),
    .link     (link_up)
  );

  link_rx #(.W(FW)) u_rx (
    .clk, .rst_n,
    .link      (link_down),
    .out_valid (rx_valid),
    .out_data  (rx_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_word <= '0;
      done    <= 1'b0;
    end else begin
      done <= rx_valid;
      if (rx_valid) in_word <= rx_data;
    end
  end

  // A start while a frame is still being sent would be lost.
  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);

endmodule
