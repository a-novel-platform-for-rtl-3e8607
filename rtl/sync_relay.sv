// sync_relay: forwards the global synchronisation level through one
// ERouting FPGA.
//
// Each node takes the level from one upstream source, chosen by 'src'
// (a neighbour direction, or its own sync_gen in the node that generates
// the signal). The neighbours run from their own clocks, so the chosen
// level passes a two-flop synchroniser and one more register before it is
// driven to the four neighbours and to the ECell: three local clock cycles
// per hop, plus up to one cycle of phase. Choosing one upstream per node
// makes the paths a spanning tree, so a level never circulates.
// 'event_out' pulses when the relayed level changes.
//
// The CONFETTI platform description gives only that the signal crosses the machine through the
// ERouting FPGAs; the spanning-tree choice and the synchroniser per hop
// are this design's own.
module sync_relay
  import confetti_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      src,        // 0..3: neighbour dir_e, 4: local source
  input  logic [NDIR-1:0] nbr_sync,   // levels from the four neighbours
  input  logic            local_sync, // level from this node's sync_gen
  output logic            sync_out,   // to the four neighbours and the ECell
  output logic            event_out
);
  logic sel;
  logic meta, synced;

  always_comb begin
    if (src < 3'd4) sel = nbr_sync[src[1:0]];
    else            sel = local_sync;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta      <= 1'b0;
      synced    <= 1'b0;
      sync_out  <= 1'b0;
      event_out <= 1'b0;
    end else begin
      meta      <= sel;
      synced    <= meta;
      sync_out  <= synced;
      event_out <= synced ^ sync_out;
    end
  end

endmodule
