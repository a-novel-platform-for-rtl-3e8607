// confetti_top: a CONFETTI machine of SX x SY EStacks joined edge to edge
// through their border connectors (3 x 2 EStacks by default, i.e. a grid
// of 18 x 6 ERouting FPGA / ECell nodes), running the machine-wide
// synchronous Game of Life on a 144 x 48 cell surface.
//
// EStack (sx, sy) has index s = sy*SX + sx; sx grows to the east and sy to
// the south. Its east border links, and synchronisation wires, meet the
// west border of EStack (sx+1, sy), its south border the north border of
// EStack (sx, sy+1). Borders of the whole machine are left open: their
// directions are disabled, so cells beyond the edge count as dead.
// Global node (0, 0), the north-west corner, generates the
// synchronisation level; 'sync_run' starts and stops it, one generation
// per toggle (every SYNC_PERIOD cycles).
//
// Clocks: every node has its own clock, node_clk[s][node], as every ECell
// has its own oscillator; board_clk runs the display read-out and the
// thermal monitors. Per-node configuration and status ports belong to
// their node's clock, sync_run to that of global node (0, 0), and the
// temperature readings to board_clk; load may come from any clock.
//
// Before running, a rising edge of 'load' (held for at least three cycles
// of the node's clock, with load_state steady) writes load_state into the ECell load_node of
// EStack load_stack (cell r, c of the ECell is bit r*N + c).
// disp_x (0..SX*NX*N-1), disp_y (0..SY*NY*N-1) read a pixel of the whole
// display surface; disp_rgb follows one board_clk cycle later.
// Per-node configuration and Flash ports, and per-node temperature
// readings, are indexed [s][node] with node = y*NX + x inside the EStack.
//
// The CONFETTI platform description gives the arrangement (EStacks side by side forming one
// larger surface, six in a 3 x 2 test machine) and the Game of Life
// experiment on it. The parts it does not design (Flash chips, FPGA
// configuration logic, temperature chips, fans, LED panels, power
// supplies) are outside this module, reached through its ports.
module confetti_top
  import confetti_pkg::*;
#(
  parameter int unsigned SX          = 3,
  parameter int unsigned SY          = 2,
  parameter int unsigned NX          = 6,
  parameter int unsigned NY          = 3,
  parameter int unsigned N           = 8,
  parameter int unsigned SYNC_PERIOD = 1024,
  parameter int unsigned FLASH_AW    = 21,
  parameter int unsigned NUM_SLOTS   = 16,
  parameter int unsigned SLOT_BYTES  = 131072,
  parameter int unsigned CFG_BYTES   = 130952,
  parameter int unsigned NS          = SX * SY,
  parameter int unsigned NN          = NX * NY,
  parameter int unsigned SW          = $clog2(NUM_SLOTS),
  parameter int unsigned XW          = $clog2(SX * NX * N),
  parameter int unsigned YW          = $clog2(SY * NY * N)
) (
  input  logic [NS-1:0][NN-1:0]         node_clk,   // one oscillator per node
  input  logic                          board_clk,  // display read-out, thermal monitors
  input  logic                          rst_n,
  // automaton control
  input  logic                          sync_run,
  input  logic                          load,
  input  logic [$clog2(NS)-1:0]         load_stack,
  input  logic [$clog2(NN)-1:0]         load_node,
  input  logic [N*N-1:0]                load_state,
  // display surface read port
  input  logic [XW-1:0]                 disp_x,
  input  logic [YW-1:0]                 disp_y,
  output logic [23:0]                   disp_rgb,
  // configuration, one set per node
  input  logic [NS-1:0][NN-1:0]         cfg_start,
  input  logic [NS-1:0][NN-1:0][SW-1:0] cfg_slot,
  output logic [NS-1:0][NN-1:0]         cfg_busy,
  output logic [NS-1:0][NN-1:0]         cfg_ok,
  output logic [NS-1:0][NN-1:0]         cfg_error,
  output logic [NS-1:0][NN-1:0][FLASH_AW-1:0] flash_addr,
  output logic [NS-1:0][NN-1:0]         flash_oe_n,
  input  logic [NS-1:0][NN-1:0][7:0]    flash_data,
  output logic [NS-1:0][NN-1:0]         prog_b,
  output logic [NS-1:0][NN-1:0]         cclk,
  output logic [NS-1:0][NN-1:0]         din,
  input  logic [NS-1:0][NN-1:0]         init_b,
  input  logic [NS-1:0][NN-1:0]         done,
  // thermal monitoring, per EStack
  input  logic [NS-1:0][NN-1:0][7:0]    temp,
  output logic [NS-1:0][7:0]            max_temp,
  output logic [NS-1:0]                 fan_on,
  // status
  output logic [NS-1:0][NN-1:0][15:0]   generation,
  output logic [NS-1:0][NN-1:0]         idle,
  output logic [NS-1:0][NN-1:0]         overrun,
  output logic [NS-1:0][NN-1:0]         overflow
);
  localparam int unsigned XS = $clog2(NX * N);
  localparam int unsigned YS = $clog2(NY * N);

  link_t [NS-1:0][NX-1:0] n_in, n_out, s_in, s_out;
  link_t [NS-1:0][NY-1:0] w_in, w_out, e_in, e_out;
  logic  [NS-1:0][NX-1:0] ns_in, ns_out, ss_in, ss_out;
  logic  [NS-1:0][NY-1:0] ws_in, ws_out, es_in, es_out;
  logic  [NS-1:0][23:0]   stack_rgb;
  logic  [XS-1:0]         lx;
  logic  [YS-1:0]         ly;
  logic  [$clog2(NS)-1:0] ssel, ssel_q;

  for (genvar sy = 0; sy < SY; sy++) begin : g_sy
    for (genvar sx = 0; sx < SX; sx++) begin : g_sx
      localparam int unsigned S = sy * SX + sx;
      localparam logic [NDIR-1:0] EN = {sx > 0, sy < SY - 1, sx < SX - 1, sy > 0}; // W S E N

      if (sy > 0) begin : g_n
        assign n_in[S]  = s_out[S-SX];
        assign ns_in[S] = ss_out[S-SX];
      end else begin : g_n_open
        assign n_in[S]  = '0;
        assign ns_in[S] = '0;
      end
      if (sy < SY - 1) begin : g_s
        assign s_in[S]  = n_out[S+SX];
        assign ss_in[S] = ns_out[S+SX];
      end else begin : g_s_open
        assign s_in[S]  = '0;
        assign ss_in[S] = '0;
      end
      if (sx > 0) begin : g_w
        assign w_in[S]  = e_out[S-1];
        assign ws_in[S] = es_out[S-1];
      end else begin : g_w_open
        assign w_in[S]  = '0;
        assign ws_in[S] = '0;
      end
      if (sx < SX - 1) begin : g_e
        assign e_in[S]  = w_out[S+1];
        assign es_in[S] = ws_out[S+1];
      end else begin : g_e_open
        assign e_in[S]  = '0;
        assign es_in[S] = '0;
      end

      estack #(
        .NX(NX), .NY(NY), .N(N), .STACK_X(sx), .STACK_Y(sy),
        .SYNC_PERIOD(SYNC_PERIOD), .FLASH_AW(FLASH_AW), .NUM_SLOTS(NUM_SLOTS),
        .SLOT_BYTES(SLOT_BYTES), .CFG_BYTES(CFG_BYTES)
      ) u_stack (
        .node_clk        (node_clk[S]),
        .board_clk,
        .rst_n,
        .edge_en         (EN),
        .edge_n_in       (n_in[S]),  .edge_n_out      (n_out[S]),
        .edge_s_in       (s_in[S]),  .edge_s_out      (s_out[S]),
        .edge_w_in       (w_in[S]),  .edge_w_out      (w_out[S]),
        .edge_e_in       (e_in[S]),  .edge_e_out      (e_out[S]),
        .edge_n_sync_in  (ns_in[S]), .edge_n_sync_out (ns_out[S]),
        .edge_s_sync_in  (ss_in[S]), .edge_s_sync_out (ss_out[S]),
        .edge_w_sync_in  (ws_in[S]), .edge_w_sync_out (ws_out[S]),
        .edge_e_sync_in  (es_in[S]), .edge_e_sync_out (es_out[S]),
        .sync_run,
        .load            (load && (load_stack == $clog2(NS)'(S))),
        .load_node,
        .load_state,
        .disp_x          (lx),
        .disp_y          (ly),
        .disp_rgb        (stack_rgb[S]),
        .cfg_start       (cfg_start[S]),
        .cfg_slot        (cfg_slot[S]),
        .cfg_busy        (cfg_busy[S]),
        .cfg_ok          (cfg_ok[S]),
        .cfg_error       (cfg_error[S]),
        .flash_addr      (flash_addr[S]),
        .flash_oe_n      (flash_oe_n[S]),
        .flash_data      (flash_data[S]),
        .prog_b          (prog_b[S]),
        .cclk            (cclk[S]),
        .din             (din[S]),
        .init_b          (init_b[S]),
        .done            (done[S]),
        .temp            (temp[S]),
        .max_temp        (max_temp[S]),
        .fan_on          (fan_on[S]),
        .generation      (generation[S]),
        .idle            (idle[S]),
        .overrun         (overrun[S]),
        .overflow        (overflow[S])
      );
    end
  end

  // ---- display surface read ----
  always_comb begin
    ssel = $clog2(NS)'((int'(disp_y) / (NY * N)) * SX + int'(disp_x) / (NX * N));
    lx   = XS'(int'(disp_x) % (NX * N));
    ly   = YS'(int'(disp_y) % (NY * N));
  end

  always_ff @(posedge board_clk or negedge rst_n) begin
    if (!rst_n) ssel_q <= '0;
    else        ssel_q <= ssel;
  end

  assign disp_rgb = stack_rgb[ssel_q];

endmodule
