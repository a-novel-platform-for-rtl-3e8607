// erouting_fpga: one ERouting FPGA of the routing board, with the links to
// its four neighbours, to the ECell plugged above it and to its Flash.
//
// It holds three independent functions:
//   - erouting_switch: splits each frame of four direction words from the
//     ECell onto the four neighbour links and gathers the neighbours'
//     words back into one frame for the ECell;
//   - sync_relay (plus sync_gen in the one node that originates it): the
//     global synchronisation level, taken from the upstream neighbour
//     SYNC_SRC (0..3 = dir_e, 4 = this node's own generator) and passed on
//     to all neighbours and to the ECell three cycles later (it comes
//     from another clock domain and is synchronised first);
//   - config_loader: loads a configuration slot from the Flash into the
//     ECell FPGA.
// port_en marks the directions that have a neighbour.
//
// The CONFETTI platform description gives this node's connections (four neighbours, the ECell,
// a Flash; Fig. 6) and its three tasks (communication, propagation of a
// global signal, configuration of the ECell); how each task is done is
// this design's own, as described in the three sub-blocks.
module erouting_fpga
  import confetti_pkg::*;
#(
  parameter int unsigned SYNC_SRC    = 4,
  parameter int unsigned SYNC_PERIOD = 1024,
  parameter int unsigned FLASH_AW    = 21,
  parameter int unsigned NUM_SLOTS   = 16,
  parameter int unsigned SLOT_BYTES  = 131072,
  parameter int unsigned CFG_BYTES   = 130952
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NDIR-1:0]          port_en,
  // ECell links
  input  link_t                    cell_up,
  output link_t                    cell_down,
  // neighbour links and synchronisation levels, indexed by dir_e
  input  link_t [NDIR-1:0]         nbr_in,
  output link_t [NDIR-1:0]         nbr_out,
  input  logic  [NDIR-1:0]         sync_in,
  output logic                     sync_out,
  // synchronisation source control (used only when SYNC_SRC == 4)
  input  logic                     sync_run,
  // configuration
  input  logic                     cfg_start,
  input  logic [$clog2(NUM_SLOTS)-1:0] cfg_slot,
  output logic                     cfg_busy,
  output logic                     cfg_ok,
  output logic                     cfg_error,
  output logic [FLASH_AW-1:0]      flash_addr,
  output logic                     flash_oe_n,
  input  logic [7:0]               flash_data,
  output logic                     prog_b,
  output logic                     cclk,
  output logic                     din,
  input  logic                     init_b,
  input  logic                     done,
  // status
  output logic                     overflow,
  output logic                     frame_up_seen,
  output logic                     frame_down_sent,
  output logic                     sync_event
);
  logic gen_level;

  erouting_switch u_switch (
    .clk, .rst_n, .port_en,
    .cell_up, .cell_down, .nbr_in, .nbr_out,
    .overflow, .frame_up_seen, .frame_down_sent
  );

  sync_gen #(.PERIOD(SYNC_PERIOD)) u_sync_gen (
    .clk, .rst_n,
    .run        (sync_run && (SYNC_SRC == 4)),
    .sync_level (gen_level),
    .tick       ()
  );

  sync_relay u_sync_relay (
    .clk, .rst_n,
    .src        (3'(SYNC_SRC)),
    .nbr_sync   (sync_in),
    .local_sync (gen_level),
    .sync_out,
    .event_out  (sync_event)
  );

  config_loader #(
    .FLASH_AW(FLASH_AW), .NUM_SLOTS(NUM_SLOTS),
    .SLOT_BYTES(SLOT_BYTES), .CFG_BYTES(CFG_BYTES)
  ) u_cfg (
    .clk, .rst_n,
    .start (cfg_start), .slot(cfg_slot),
    .busy  (cfg_busy), .ok(cfg_ok), .error(cfg_error),
    .flash_addr, .flash_oe_n, .flash_data,
    .prog_b, .cclk, .din, .init_b, .done
  );

endmodule
