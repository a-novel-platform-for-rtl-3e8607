// erouting_switch: the data path of one ERouting FPGA in the direct
// (Hermes-free) configuration used for the synchronous Game of Life.
//
// Upward: a frame from the ECell above carries four WORD_W-bit words, one
// per direction. The word for direction d is sent on the link to the
// neighbouring ERouting FPGA in that direction (all four in parallel).
// Downward: words arriving from the four neighbours are queued in a
// two-entry FIFO per direction. When every enabled direction holds a word
// and the link to the ECell is free, one word is popped from each and the
// four go up to the ECell as one frame; a disabled direction (a board
// border with nothing connected) contributes an all-zero word.
//
// port_en marks the directions with a neighbour. The two-entry FIFOs
// absorb the skew that lets a neighbour's next word arrive before this
// node has gathered the current set. overflow is a sticky error flag set
// if a word arrives at a full FIFO.
//
// The CONFETTI platform description gives the topology (each ERouting FPGA linked to its four
// neighbours and to its ECell by the same kind of link) and that the
// synchronous automaton ran with the four buses on those links directly
// rather than through Hermes switches; the FIFOs, gathering rule and zero
// fill are this design's own.
module erouting_switch
  import confetti_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NDIR-1:0]  port_en,
  // ECell side
  input  link_t            cell_up,     // from the ECell
  output link_t            cell_down,   // to the ECell
  // neighbour side, indexed by dir_e
  input  link_t [NDIR-1:0] nbr_in,
  output link_t [NDIR-1:0] nbr_out,
  // status
  output logic             overflow,
  output logic             frame_up_seen,    // pulse: a frame from the ECell was split
  output logic             frame_down_sent   // pulse: a gathered frame was started to the ECell
);
  localparam int unsigned FW = NDIR * WORD_W;

  // ---- upward: ECell frame -> four neighbour links ----
  logic                         up_valid;
  logic [NDIR-1:0][WORD_W-1:0]  up_words;
  logic [NDIR-1:0]              ntx_ready;

  link_rx #(.W(FW)) u_cell_rx (
    .clk, .rst_n, .link(cell_up), .out_valid(up_valid), .out_data(up_words)
  );

  // ---- downward: neighbour links -> FIFOs -> ECell frame ----
  logic [NDIR-1:0]             nrx_valid;
  logic [NDIR-1:0][WORD_W-1:0] nrx_data;
  logic [NDIR-1:0][1:0][WORD_W-1:0] fifo_mem;
  logic [NDIR-1:0][1:0]        fifo_cnt;   // 0..2
  logic [NDIR-1:0]             have_word;
  logic                        ctx_ready;
  logic                        gather;
  logic [NDIR-1:0][WORD_W-1:0] down_words;

  for (genvar d = 0; d < NDIR; d++) begin : g_dir
    link_tx #(.W(WORD_W)) u_ntx (
      .clk, .rst_n,
      .in_valid (up_valid && port_en[d]),
      .in_ready (ntx_ready[d]),
      .in_data  (up_words[d]),
      .link     (nbr_out[d])
    );

    link_rx #(.W(WORD_W)) u_nrx (
      .clk, .rst_n, .link(nbr_in[d]), .out_valid(nrx_valid[d]), .out_data(nrx_data[d])
    );

    assign have_word[d]  = !port_en[d] || (fifo_cnt[d] != 2'd0);
    assign down_words[d] = port_en[d] ? fifo_mem[d][0] : '0;
  end

  assign gather = (&have_word) && ctx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_mem <= '0;
      fifo_cnt <= '0;
      overflow <= 1'b0;
    end else begin
      for (int d = 0; d < NDIR; d++) begin
        logic pop, push;
        pop  = gather && port_en[d];
        push = nrx_valid[d] && port_en[d];
        // Entry 0 is the head. Pop shifts entry 1 down.
        unique case ({push, pop})
          2'b01: begin
            fifo_mem[d][0] <= fifo_mem[d][1];
            fifo_cnt[d]    <= fifo_cnt[d] - 2'd1;
          end
          2'b10: begin
            if (fifo_cnt[d] == 2'd2) overflow <= 1'b1;
            else begin
              fifo_mem[d][fifo_cnt[d][0]] <= nrx_data[d];
              fifo_cnt[d]                 <= fifo_cnt[d] + 2'd1;
            end
          end
          2'b11: begin
            if (fifo_cnt[d] == 2'd1) fifo_mem[d][0] <= nrx_data[d];
            else begin
              fifo_mem[d][0] <= fifo_mem[d][1];
              fifo_mem[d][1] <= nrx_data[d];
            end
          end
          default: ;
        endcase
      end
    end
  end

  link_tx #(.W(FW)) u_cell_tx (
    .clk, .rst_n,
    .in_valid (&have_word),
    .in_ready (ctx_ready),
    .in_data  (down_words),
    .link     (cell_down)
  );

  assign frame_up_seen   = up_valid;
  assign frame_down_sent = gather;

  // The ECell sends one frame per exchange; a neighbour link must be idle by then.
  for (genvar d = 0; d < NDIR; d++) begin : g_chk
    a_ntx_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 (up_valid && port_en[d]) |-> ntx_ready[d]);
  end

endmodule
