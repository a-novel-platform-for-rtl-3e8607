// confetti_top_tb: end-to-end test of the whole machine at its default
// size (3 x 2 EStacks, 108 nodes, 144 x 48 cells, SYNC_PERIOD 1024).
//  - Every ECell is loaded with a random pattern (about one cell in three
//    alive), so patterns cross ECell borders, EStack borders and the edge
//    of the machine.
//  - The global synchronisation is started; after every generation the
//    states of all 108 tiles are compared with a Game of Life reference
//    on the 144 x 48 surface (cells beyond the edge dead), all generation
//    counters must agree, and no tile may overrun or overflow.
//  - The time from the source's toggle to the last tile finishing is
//    measured and must fit in one synchronisation period.
//  - After the run the whole display surface is read back pixel by pixel
//    and compared with the reference.
//  - In parallel, node 0 of EStack 0 loads configuration slot 3 from a
//    Flash model into an FPGA model (full 130,952-byte bitstream), and the
//    temperatures of EStack 4 rise until its fans switch on.
// The nodes run from four unrelated oscillators (about 97 to 103 MHz in
// simulation time), so every link crosses between clock domains.
// Mechanisms counted (each must occur): synchronisation toggles relayed,
// frames crossing an EStack border, live cells on the machine edge,
// configuration completed, fan switched on, display read-back.
module confetti_top_tb;
  import confetti_pkg::*;
  localparam int unsigned SX = 3, SY = 2, NX = 6, NY = 3, N = 8;
  localparam int unsigned NS = SX * SY, NN = NX * NY;
  localparam int unsigned W = SX * NX * N, H = SY * NY * N;   // 144 x 48
  localparam int unsigned GENS = 12;
  localparam int unsigned PERIOD = 1024;
  localparam int unsigned CFG_BYTES = 130952, SLOT_BYTES = 131072;

  // clk is the board clock (display read-out, thermal monitors). The nodes
  // run from four free-running oscillators of slightly different
  // frequencies and phases; node (s, n) takes oscillator (s + n) mod 4, so
  // any two neighbouring nodes are in different clock domains.
  logic clk = 0, rst_n = 0;
  logic [3:0] osc = '0;
  logic [NS-1:0][NN-1:0] node_clk;
  logic sync_run, load;
  logic [2:0] load_stack;
  logic [4:0] load_node;
  logic [63:0] load_state;
  logic [7:0] disp_x;
  logic [5:0] disp_y;
  logic [23:0] disp_rgb;
  logic [NS-1:0][NN-1:0] cfg_start, cfg_busy, cfg_ok, cfg_error;
  logic [NS-1:0][NN-1:0][3:0] cfg_slot;
  logic [NS-1:0][NN-1:0][20:0] flash_addr;
  logic [NS-1:0][NN-1:0] flash_oe_n, prog_b, cclk, din, init_b, done;
  logic [NS-1:0][NN-1:0][7:0] flash_data, temp;
  logic [NS-1:0][7:0] max_temp;
  logic [NS-1:0] fan_on;
  logic [NS-1:0][NN-1:0][15:0] generation;
  logic [NS-1:0][NN-1:0] idle, overrun, overflow;
  int checks = 0, failures = 0;

  confetti_top dut (
    .node_clk, .board_clk(clk), .rst_n, .sync_run, .load, .load_stack, .load_node, .load_state,
    .disp_x, .disp_y, .disp_rgb,
    .cfg_start, .cfg_slot, .cfg_busy, .cfg_ok, .cfg_error,
    .flash_addr, .flash_oe_n, .flash_data, .prog_b, .cclk, .din, .init_b, .done,
    .temp, .max_temp, .fan_on,
    .generation, .idle, .overrun, .overflow);

  always #5 clk = !clk;
  initial begin #1.3; forever #5.05 osc[0] = !osc[0]; end
  initial begin #2.1; forever #4.95 osc[1] = !osc[1]; end
  initial begin #3.7; forever #5.15 osc[2] = !osc[2]; end
  initial begin #0.6; forever #4.85 osc[3] = !osc[3]; end
  always_comb
    for (int s = 0; s < NS; s++)
      for (int n = 0; n < NN; n++) node_clk[s][n] = osc[(s + n) % 4];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- external parts: one Flash and one FPGA configuration model ----
  logic [7:0] fdata0;
  logic init0, done0;
  flash_model #(.AW(21), .WAIT(6)) u_flash (.clk(osc[0]), .addr(flash_addr[0][0]), .oe_n(flash_oe_n[0][0]), .data(fdata0));
  fpga_cfg_model #(.MAX_BYTES(CFG_BYTES), .DONE_AFTER_BITS(8 * CFG_BYTES)) u_fpga (
    .clk(osc[0]), .prog_b(prog_b[0][0]), .cclk(cclk[0][0]), .din(din[0][0]), .never_done(1'b0),
    .init_b(init0), .done(done0));
  always_comb begin
    flash_data = '0;
    init_b     = '1;
    done       = '0;
    flash_data[0][0] = fdata0;
    init_b[0][0]     = init0;
    done[0][0]       = done0;
  end

  // ---- tile states, read through the hierarchy ----
  logic [NS-1:0][NN-1:0][63:0] st;
  for (genvar sy = 0; sy < SY; sy++) begin : g_sy
    for (genvar sx = 0; sx < SX; sx++) begin : g_sx
      for (genvar y = 0; y < NY; y++) begin : g_y
        for (genvar x = 0; x < NX; x++) begin : g_x
          assign st[sy*SX+sx][y*NX+x] = dut.g_sy[sy].g_sx[sx].u_stack.g_y[y].g_x[x].u_ecell.state;
        end
      end
    end
  end

  // ---- reference world ----
  logic world [H][W];
  logic nxt   [H][W];

  function automatic int stack_of(input int gx, input int gy);
    return (gy / (NY * N)) * SX + gx / (NX * N);
  endfunction
  function automatic int node_of(input int gx, input int gy);
    return ((gy % (NY * N)) / N) * NX + (gx % (NX * N)) / N;
  endfunction
  function automatic int bit_of(input int gx, input int gy);
    return (gy % N) * N + (gx % N);
  endfunction

  task automatic ref_step();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int cnt;
        cnt = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (!(dr == 0 && dc == 0) && r + dr >= 0 && r + dr < H && c + dc >= 0 && c + dc < W)
              cnt += int'(world[r+dr][c+dc]);
        nxt[r][c] = (cnt == 3) || (cnt == 2 && world[r][c]);
      end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) world[r][c] = nxt[r][c];
  endtask

  function automatic int compare_states();
    int bad;
    bad = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        if (st[stack_of(c, r)][node_of(c, r)][bit_of(c, r)] != world[r][c]) bad++;
    return bad;
  endfunction

  // ---- mechanism counters ----
  int n_sync_toggles = 0, n_cross_frames = 0, n_edge_live = 0, n_cfg = 0, n_fan = 0, n_disp = 0;
  logic src_q = 0;
  logic [NS-1:0][NX-1:0] sstrobe_q;
  logic [NS-1:0][NY-1:0] estrobe_q;
  always @(posedge clk) if (rst_n) begin
    src_q <= dut.g_sy[0].g_sx[0].u_stack.g_y[0].g_x[0].u_router.sync_out;
    if (dut.g_sy[0].g_sx[0].u_stack.g_y[0].g_x[0].u_router.sync_out != src_q) n_sync_toggles++;
    for (int s = 0; s < NS; s++) begin
      for (int x = 0; x < NX; x++) begin
        if (dut.s_out[s][x].strobe && !sstrobe_q[s][x] && s / SX < SY - 1) n_cross_frames++;
        sstrobe_q[s][x] <= dut.s_out[s][x].strobe;
      end
      for (int y = 0; y < NY; y++) begin
        if (dut.e_out[s][y].strobe && !estrobe_q[s][y] && s % SX < SX - 1) n_cross_frames++;
        estrobe_q[s][y] <= dut.e_out[s][y].strobe;
      end
    end
  end
  logic fan_q = 0;
  always @(posedge clk) if (rst_n) begin
    fan_q <= fan_on[4];
    if (fan_on[4] && !fan_q) n_fan++;
  end

  function automatic logic [7:0] content(input int a);
    return 8'(a * 37) ^ 8'(a >> 8) ^ 8'h3C;
  endfunction

  // ---- configuration and thermal stimulus, in parallel ----
  initial begin
    int bad;
    cfg_start = '0; cfg_slot = '0;
    for (int s = 0; s < NS; s++) for (int n = 0; n < NN; n++) temp[s][n] = 8'(30 + n);
    wait (rst_n);
    repeat (10) @(negedge osc[0]);
    cfg_slot[0][0] = 4'd3; cfg_start[0][0] = 1;
    @(negedge osc[0]) cfg_start[0][0] = 0;
    // warm EStack 4 up past the fan threshold, one degree per 200 cycles
    for (int t = 40; t <= 65; t++) begin
      temp[4][11] = 8'(t);
      repeat (200) @(negedge clk);
      chk(fan_on[4] == (t >= 60), $sformatf("fan at %0d C", t));
      chk(fan_on[0] == 0, "cool EStack keeps its fans off");
    end
    wait (!cfg_busy[0][0]);
    chk(cfg_ok[0][0] && !cfg_error[0][0], "configuration of node 0 completed");
    bad = 0;
    for (int i = 0; i < CFG_BYTES; i++) if (u_fpga.bytes[i] != content(3 * SLOT_BYTES + i)) bad++;
    chk(bad == 0, $sformatf("%0d configuration bytes wrong", bad));
    if (cfg_ok[0][0] && bad == 0) n_cfg++;
  end

  initial begin
    int bad, t_toggle, t_done, worst;
    sync_run = 0; load = 0; load_stack = '0; load_node = '0; load_state = '0;
    disp_x = '0; disp_y = '0;
    sstrobe_q = '0; estrobe_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random soup
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) world[r][c] = ($urandom_range(0, 2) == 0);
    for (int s = 0; s < NS; s++)
      for (int n = 0; n < NN; n++) begin
        @(negedge clk);
        load = 0; load_stack = 3'(s); load_node = 5'(n);
        for (int b = 0; b < 64; b++) begin
          int gx, gy;
          gx = (s % SX) * NX * N + (n % NX) * N + b % N;
          gy = (s / SX) * NY * N + (n / NX) * N + b / N;
          load_state[b] = world[gy][gx];
        end
        // the ECell sees the rising edge of load through its synchroniser
        @(negedge clk) load = 1;
        repeat (5) @(negedge clk);
      end
    @(negedge clk) load = 0;
    repeat (80) @(negedge clk);
    bad = compare_states();
    chk(bad == 0, $sformatf("initial pattern: %0d cells wrong", bad));
    // run
    worst = 0;
    @(negedge clk) sync_run = 1;
    for (int g = 1; g <= GENS; g++) begin
      // wait for the source toggle, then for every tile to finish
      wait (n_sync_toggles == g);
      t_toggle = $time / 10;
      @(negedge clk);
      while (!(&idle) || generation[NS-1][NN-1] != 16'(g)) begin
        @(negedge clk);
        // a generation that is not over after four periods never will be
        if ($time / 10 - t_toggle > 4 * PERIOD) begin
          $display("FAIL: generation %0d did not finish", g);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
          $finish;
        end
      end
      t_done = $time / 10;
      if (t_done - t_toggle > worst) worst = t_done - t_toggle;
      ref_step();
      for (int c = 0; c < W; c++) if (world[0][c] || world[H-1][c]) n_edge_live++;
      for (int r = 0; r < H; r++) if (world[r][0] || world[r][W-1]) n_edge_live++;
      bad = compare_states();
      chk(bad == 0, $sformatf("generation %0d: %0d cells wrong", g, bad));
      begin
        int off;
        off = 0;
        for (int s = 0; s < NS; s++) for (int n = 0; n < NN; n++) if (generation[s][n] != 16'(g)) off++;
        chk(off == 0, $sformatf("generation %0d: %0d counters disagree", g, off));
      end
    end
    @(negedge clk) sync_run = 0;
    chk(worst < PERIOD, $sformatf("a generation takes %0d cycles, period %0d", worst, PERIOD));
    $display("generation time: %0d cycles (sync period %0d)", worst, PERIOD);
    chk(overrun == '0, "no tile overran");
    chk(overflow == '0, "no router FIFO overflowed");
    // display read-back
    bad = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk); disp_x = 8'(c); disp_y = 6'(r);
        @(negedge clk);
        if (disp_rgb != (world[r][c] ? 24'hFFFFFF : 24'h000000)) bad++;
        n_disp++;
      end
    chk(bad == 0, $sformatf("display: %0d pixels wrong", bad));
    // wait for the configuration to finish
    wait (n_cfg > 0 || failures > 0 || (!cfg_busy[0][0] && $time > 100000));
    repeat (10) @(negedge clk);
    $display("mechanisms: sync toggles %0d, border-crossing frames %0d, edge live cells %0d, configurations %0d, fan switch-ons %0d, pixels read %0d",
             n_sync_toggles, n_cross_frames, n_edge_live, n_cfg, n_fan, n_disp);
    chk(n_sync_toggles >= GENS, "synchronisation toggles relayed");
    chk(n_cross_frames > 0, "frames crossed EStack borders");
    chk(n_edge_live > 0, "live cells on the machine edge");
    chk(n_cfg > 0, "configuration loaded");
    chk(n_fan > 0, "fans switched on");
    chk(n_disp == W * H, "display read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
