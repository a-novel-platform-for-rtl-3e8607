// estack_tb: test of a single EStack standing alone (no neighbours at any
// border), at its default size: 6 x 3 nodes, 48 x 24 cells.
// Every ECell is loaded with a random pattern; after each of 8
// generations the 18 tile states are compared with a Game of Life
// reference on 48 x 24 cells with dead cells beyond the edge; then the
// display is read back pixel by pixel. Also checks the thermal monitor's
// maximum, and that no border link of a lone EStack carries a frame.
// The nodes run from three oscillators of different frequencies and
// phases (node x, y takes oscillator (x + y) mod 3, so neighbours never
// share a clock); clk is the board clock.
module estack_tb;
  import confetti_pkg::*;
  localparam int unsigned NX = 6, NY = 3, N = 8, NN = NX * NY;
  localparam int unsigned W = NX * N, H = NY * N;
  localparam int unsigned GENS = 8;

  logic clk = 0, rst_n = 0;
  logic [2:0] osc = '0;
  logic [NN-1:0] node_clk;
  link_t [NX-1:0] n_out, s_out;
  link_t [NY-1:0] w_out, e_out;
  logic sync_run, load;
  logic [4:0] load_node;
  logic [63:0] load_state;
  logic [5:0] disp_x;
  logic [4:0] disp_y;
  logic [23:0] disp_rgb;
  logic [NN-1:0][7:0] temp;
  logic [7:0] max_temp;
  logic fan_on;
  logic [NN-1:0][15:0] generation;
  logic [NN-1:0] idle, overrun, overflow;
  int checks = 0, failures = 0;
  int border_frames = 0;

  estack dut (
    .node_clk, .board_clk(clk), .rst_n, .edge_en(4'b0000),
    .edge_n_in('0), .edge_n_out(n_out), .edge_s_in('0), .edge_s_out(s_out),
    .edge_w_in('0), .edge_w_out(w_out), .edge_e_in('0), .edge_e_out(e_out),
    .edge_n_sync_in('0), .edge_n_sync_out(), .edge_s_sync_in('0), .edge_s_sync_out(),
    .edge_w_sync_in('0), .edge_w_sync_out(), .edge_e_sync_in('0), .edge_e_sync_out(),
    .sync_run, .load, .load_node, .load_state,
    .disp_x, .disp_y, .disp_rgb,
    .cfg_start('0), .cfg_slot('0), .cfg_busy(), .cfg_ok(), .cfg_error(),
    .flash_addr(), .flash_oe_n(), .flash_data('0), .prog_b(), .cclk(), .din(),
    .init_b('1), .done('0),
    .temp, .max_temp, .fan_on,
    .generation, .idle, .overrun, .overflow);

  always #5 clk = !clk;
  initial begin #1.1; forever #5.2 osc[0] = !osc[0]; end
  initial begin #3.4; forever #4.9 osc[1] = !osc[1]; end
  initial begin #0.7; forever #5.05 osc[2] = !osc[2]; end
  always_comb
    for (int n = 0; n < NN; n++) node_clk[n] = osc[(n % NX + n / NX) % 3];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NX; i++) if (n_out[i].strobe || s_out[i].strobe) border_frames++;

  logic [NN-1:0][63:0] st;
  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      assign st[y*NX+x] = dut.g_y[y].g_x[x].u_ecell.state;
    end
  end

  logic world [H][W];
  logic nxt   [H][W];

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
        if (st[(r / N) * NX + c / N][(r % N) * N + c % N] != world[r][c]) bad++;
    return bad;
  endfunction

  initial begin
    int bad;
    sync_run = 0; load = 0; load_node = '0; load_state = '0; disp_x = '0; disp_y = '0;
    for (int n = 0; n < NN; n++) temp[n] = 8'(20 + (n * 7) % 30);
    temp[13] = 8'd77;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) world[r][c] = ($urandom_range(0, 2) == 0);
    for (int n = 0; n < NN; n++) begin
      @(negedge clk);
      load = 0; load_node = 5'(n);
      for (int b = 0; b < 64; b++) load_state[b] = world[(n / NX) * N + b / N][(n % NX) * N + b % N];
      // held through the ECell's load synchroniser
      @(negedge clk) load = 1;
      repeat (5) @(negedge clk);
    end
    @(negedge clk) load = 0;
    repeat (80) @(negedge clk);
    chk(compare_states() == 0, "initial pattern");
    chk(max_temp == 8'd77 && fan_on, "thermal maximum and fan");
    @(negedge clk) sync_run = 1;
    for (int g = 1; g <= GENS; g++) begin
      wait (generation[0] == 16'(g));
      @(negedge clk);
      while (!(&idle)) @(negedge clk);
      ref_step();
      bad = compare_states();
      chk(bad == 0, $sformatf("generation %0d: %0d cells wrong", g, bad));
      chk(generation[NN-1] == 16'(g), "last node's counter");
    end
    sync_run = 0;
    bad = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk); disp_x = 6'(c); disp_y = 5'(r);
        @(negedge clk);
        if (disp_rgb != (world[r][c] ? 24'hFFFFFF : 24'h000000)) bad++;
      end
    chk(bad == 0, $sformatf("display: %0d pixels wrong", bad));
    chk(overrun == '0 && overflow == '0, "no overrun, no overflow");
    chk(border_frames == 0, "no frames out of disabled borders");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
