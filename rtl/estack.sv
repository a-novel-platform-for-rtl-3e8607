// estack: one EStack, the basic unit of the machine: an ERouting board
// with NX x NY ERouting FPGAs in a regular grid, an ECell on top of each,
// the EDisplay board above them and the board's thermal monitoring.
//
// Node (x, y), x = 0..NX-1 from west to east and y = 0..NY-1 from north to
// south, has index y*NX + x in every per-node array. Each node is an
// erouting_fpga and an ecell_gol joined by their up/down links, plus the
// node's display_tile (its N x N pixel square of the EDisplay).
// Neighbouring ERouting FPGAs are joined by a link in each direction and a
// synchronisation wire. At the board's four borders the same links and
// wires come out as the edge_* ports (the border connectors); edge_en says
// which borders have another EStack attached, and a node's unattached
// directions are disabled (they supply all-zero halo words).
//
// The global synchronisation level is relayed along a spanning tree rooted
// at global node (0, 0) of the whole machine (STACK_X, STACK_Y give this
// EStack's place): nodes of global row 0 take it from the west, all
// others from the north; the root generates it.
//
// Clocks: there is no global clock. Each node (its ERouting FPGA and its
// ECell) runs from its own oscillator, node_clk[i]; the links between
// nodes forward the sender's clock and cross into the receiver's clock
// inside link_rx. board_clk runs the display read-out and the thermal
// monitor. Per-node configuration and status ports belong to that node's
// clock; load may come from any clock (each ECell synchronises it); rst_n
// is an asynchronous reset shared by all.
//
// Display: disp_x (0..NX*N-1), disp_y (0..NY*N-1) select a pixel of this
// EStack's display; disp_rgb follows one board_clk cycle later.
//
// The CONFETTI platform description gives the 6 x 3 grid of ERouting FPGAs with 18 ECells, the
// 48 x 24 display split into 8 x 8 squares, one per ECell, and the border
// connectors that make adjacent EStacks behave as one larger one. The
// power board has no logic function and is not modelled.
module estack
  import confetti_pkg::*;
#(
  parameter int unsigned NX          = 6,
  parameter int unsigned NY          = 3,
  parameter int unsigned N           = 8,
  parameter int unsigned STACK_X     = 0,
  parameter int unsigned STACK_Y     = 0,
  parameter int unsigned SYNC_PERIOD = 1024,
  parameter int unsigned FLASH_AW    = 21,
  parameter int unsigned NUM_SLOTS   = 16,
  parameter int unsigned SLOT_BYTES  = 131072,
  parameter int unsigned CFG_BYTES   = 130952,
  parameter int unsigned NN          = NX * NY,
  parameter int unsigned SW          = $clog2(NUM_SLOTS),
  parameter int unsigned XW          = $clog2(NX * N),
  parameter int unsigned YW          = $clog2(NY * N)
) (
  input  logic [NX*NY-1:0]         node_clk,   // one oscillator per node
  input  logic                      board_clk,  // display read-out and thermal monitor
  input  logic                      rst_n,
  // border connectors
  input  logic  [NDIR-1:0]          edge_en,
  input  link_t [NX-1:0]            edge_n_in,
  output link_t [NX-1:0]            edge_n_out,
  input  link_t [NX-1:0]            edge_s_in,
  output link_t [NX-1:0]            edge_s_out,
  input  link_t [NY-1:0]            edge_w_in,
  output link_t [NY-1:0]            edge_w_out,
  input  link_t [NY-1:0]            edge_e_in,
  output link_t [NY-1:0]            edge_e_out,
  input  logic  [NX-1:0]            edge_n_sync_in,
  output logic  [NX-1:0]            edge_n_sync_out,
  input  logic  [NX-1:0]            edge_s_sync_in,
  output logic  [NX-1:0]            edge_s_sync_out,
  input  logic  [NY-1:0]            edge_w_sync_in,
  output logic  [NY-1:0]            edge_w_sync_out,
  input  logic  [NY-1:0]            edge_e_sync_in,
  output logic  [NY-1:0]            edge_e_sync_out,
  // automaton control
  input  logic                      sync_run,
  input  logic                      load,
  input  logic [$clog2(NN)-1:0]     load_node,
  input  logic [N*N-1:0]            load_state,
  // display read port
  input  logic [XW-1:0]             disp_x,
  input  logic [YW-1:0]             disp_y,
  output logic [23:0]               disp_rgb,
  // configuration, one set per node
  input  logic [NN-1:0]             cfg_start,
  input  logic [NN-1:0][SW-1:0]     cfg_slot,
  output logic [NN-1:0]             cfg_busy,
  output logic [NN-1:0]             cfg_ok,
  output logic [NN-1:0]             cfg_error,
  output logic [NN-1:0][FLASH_AW-1:0] flash_addr,
  output logic [NN-1:0]             flash_oe_n,
  input  logic [NN-1:0][7:0]        flash_data,
  output logic [NN-1:0]             prog_b,
  output logic [NN-1:0]             cclk,
  output logic [NN-1:0]             din,
  input  logic [NN-1:0]             init_b,
  input  logic [NN-1:0]             done,
  // thermal monitoring
  input  logic [NN-1:0][7:0]        temp,
  output logic [7:0]                max_temp,
  output logic                      fan_on,
  // status
  output logic [NN-1:0][15:0]       generation,
  output logic [NN-1:0]             idle,
  output logic [NN-1:0]             overrun,
  output logic [NN-1:0]             overflow
);
  localparam int unsigned AW = $clog2(N * N);

  link_t [NN-1:0][NDIR-1:0] nin, nout;
  logic  [NN-1:0][NDIR-1:0] sin;
  logic  [NN-1:0]           sout;
  link_t [NN-1:0]           up, down;
  logic  [NN-1:0][NDIR-1:0] pen;

  logic  [NN-1:0]           pix_we;
  logic  [NN-1:0][AW-1:0]   pix_addr;
  logic  [NN-1:0][23:0]     pix_rgb;
  logic  [NN-1:0][23:0]     tile_rgb;
  logic  [AW-1:0]           tile_raddr;
  logic  [$clog2(NN)-1:0]   tile_sel, tile_sel_q;

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned I  = y * NX + x;
      localparam int unsigned GX = STACK_X * NX + x;
      localparam int unsigned GY = STACK_Y * NY + y;
      localparam int unsigned SRC = (GX == 0 && GY == 0) ? 4 :
                                    (GY == 0)            ? int'(DIR_W) : int'(DIR_N);

      // ---- links and sync, north ----
      if (y == 0) begin : g_n_edge
        assign nin[I][DIR_N] = edge_n_in[x];
        assign edge_n_out[x] = nout[I][DIR_N];
        assign sin[I][DIR_N] = edge_n_sync_in[x];
        assign edge_n_sync_out[x] = sout[I];
        assign pen[I][DIR_N] = edge_en[DIR_N];
      end else begin : g_n_int
        assign nin[I][DIR_N] = nout[I-NX][DIR_S];
        assign sin[I][DIR_N] = sout[I-NX];
        assign pen[I][DIR_N] = 1'b1;
      end
      // ---- south ----
      if (y == NY - 1) begin : g_s_edge
        assign nin[I][DIR_S] = edge_s_in[x];
        assign edge_s_out[x] = nout[I][DIR_S];
        assign sin[I][DIR_S] = edge_s_sync_in[x];
        assign edge_s_sync_out[x] = sout[I];
        assign pen[I][DIR_S] = edge_en[DIR_S];
      end else begin : g_s_int
        assign nin[I][DIR_S] = nout[I+NX][DIR_N];
        assign sin[I][DIR_S] = sout[I+NX];
        assign pen[I][DIR_S] = 1'b1;
      end
      // ---- west ----
      if (x == 0) begin : g_w_edge
        assign nin[I][DIR_W] = edge_w_in[y];
        assign edge_w_out[y] = nout[I][DIR_W];
        assign sin[I][DIR_W] = edge_w_sync_in[y];
        assign edge_w_sync_out[y] = sout[I];
        assign pen[I][DIR_W] = edge_en[DIR_W];
      end else begin : g_w_int
        assign nin[I][DIR_W] = nout[I-1][DIR_E];
        assign sin[I][DIR_W] = sout[I-1];
        assign pen[I][DIR_W] = 1'b1;
      end
      // ---- east ----
      if (x == NX - 1) begin : g_e_edge
        assign nin[I][DIR_E] = edge_e_in[y];
        assign edge_e_out[y] = nout[I][DIR_E];
        assign sin[I][DIR_E] = edge_e_sync_in[y];
        assign edge_e_sync_out[y] = sout[I];
        assign pen[I][DIR_E] = edge_en[DIR_E];
      end else begin : g_e_int
        assign nin[I][DIR_E] = nout[I+1][DIR_W];
        assign sin[I][DIR_E] = sout[I+1];
        assign pen[I][DIR_E] = 1'b1;
      end

      erouting_fpga #(
        .SYNC_SRC(SRC), .SYNC_PERIOD(SYNC_PERIOD), .FLASH_AW(FLASH_AW),
        .NUM_SLOTS(NUM_SLOTS), .SLOT_BYTES(SLOT_BYTES), .CFG_BYTES(CFG_BYTES)
      ) u_router (
        .clk        (node_clk[I]),
        .rst_n,
        .port_en    (pen[I]),
        .cell_up    (up[I]),
        .cell_down  (down[I]),
        .nbr_in     (nin[I]),
        .nbr_out    (nout[I]),
        .sync_in    (sin[I]),
        .sync_out   (sout[I]),
        .sync_run,
        .cfg_start  (cfg_start[I]),
        .cfg_slot   (cfg_slot[I]),
        .cfg_busy   (cfg_busy[I]),
        .cfg_ok     (cfg_ok[I]),
        .cfg_error  (cfg_error[I]),
        .flash_addr (flash_addr[I]),
        .flash_oe_n (flash_oe_n[I]),
        .flash_data (flash_data[I]),
        .prog_b     (prog_b[I]),
        .cclk       (cclk[I]),
        .din        (din[I]),
        .init_b     (init_b[I]),
        .done       (done[I]),
        .overflow   (overflow[I]),
        .frame_up_seen   (),
        .frame_down_sent (),
        .sync_event      ()
      );

      ecell_gol #(.N(N)) u_ecell (
        .clk        (node_clk[I]),
        .rst_n,
        .sync_in    (sout[I]),
        .load       (load && (load_node == $clog2(NN)'(I))),
        .load_state,
        .link_up    (up[I]),
        .link_down  (down[I]),
        .pix_we     (pix_we[I]),
        .pix_addr   (pix_addr[I]),
        .pix_rgb    (pix_rgb[I]),
        .state      (),
        .idle       (idle[I]),
        .generation (generation[I]),
        .overrun    (overrun[I])
      );

      display_tile #(.N(N)) u_tile (
        .wclk  (node_clk[I]),
        .we    (pix_we[I]),
        .waddr (pix_addr[I]),
        .wdata (pix_rgb[I]),
        .rclk  (board_clk),
        .raddr (tile_raddr),
        .rdata (tile_rgb[I])
      );
    end
  end

  // ---- display read: pick the tile, read it, select its output ----
  always_comb begin
    tile_sel   = $clog2(NN)'((int'(disp_y) / N) * NX + int'(disp_x) / N);
    tile_raddr = AW'((int'(disp_y) % N) * N + int'(disp_x) % N);
  end

  always_ff @(posedge board_clk or negedge rst_n) begin
    if (!rst_n) tile_sel_q <= '0;
    else        tile_sel_q <= tile_sel;
  end

  assign disp_rgb = tile_rgb[tile_sel_q];

  thermal_monitor #(.NS(NN)) u_thermal (
    .clk        (board_clk),
    .rst_n,
    .temp,
    .max_temp,
    .hot_sensor (),
    .fan_on
  );

endmodule
