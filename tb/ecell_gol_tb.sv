// ecell_gol_tb: self-checking test of one ecell_gol tile (N = 8).
// The testbench plays the ERouting FPGA and the eight surrounding tiles,
// whose states it draws at random for every generation. It answers each
// of the tile's frames with the words the neighbours would send:
//   exchange A: the west neighbour's east column and the east neighbour's
//               west column;
//   exchange B: the north neighbour's south row and the south neighbour's
//               north row, each extended by the corner cells of the
//               diagonal tiles.
// It checks the words the tile sends (its edge columns, then its edge rows
// extended by the received halo), the new state against a Game of Life
// reference on the 24 x 24 neighbourhood, the 64 pixel writes, the
// generation counter, and that a second toggle during a generation sets
// 'overrun'.
module ecell_gol_tb;
  import confetti_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned FW = NDIR * WORD_W;
  localparam logic [23:0] LIVE = 24'h00FF40, DEAD = 24'h000010;

  logic clk = 0, rst_n = 0;
  logic sync_in, load;
  logic [N*N-1:0] load_state, state;
  link_t link_up, link_down, link_down_drv;
  // the testbench changes its lanes on clk's falling edge and forwards the
  // inverted clock with them
  assign link_down = '{fclk: !clk, strobe: link_down_drv.strobe, d: link_down_drv.d};
  logic pix_we;
  logic [5:0] pix_addr;
  logic [23:0] pix_rgb;
  logic idle, overrun;
  logic [15:0] generation;
  int checks = 0, failures = 0;

  ecell_gol #(.N(N), .LIVE_RGB(LIVE), .DEAD_RGB(DEAD)) dut (
    .clk, .rst_n, .sync_in, .load, .load_state, .link_up, .link_down,
    .pix_we, .pix_addr, .pix_rgb, .state, .idle, .generation, .overrun);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // world[r][c] for r, c in 0..23; the tile under test is at rows/cols 8..15
  logic world [24][24];
  logic [23:0] pixels [64];
  int pix_writes = 0;

  always @(posedge clk) if (rst_n && pix_we) begin
    pixels[pix_addr] <= pix_rgb;
    pix_writes++;
  end

  task automatic get_frame(output logic [FW-1:0] f);
    int b;
    b = 0;
    while (!link_up.strobe) @(negedge clk);
    while (link_up.strobe) begin f[b*2 +: 2] = link_up.d; b++; @(negedge clk); end
    chk(b == FW / 2, "frame length from the tile");
  endtask

  task automatic put_frame(input logic [FW-1:0] f);
    for (int b = 0; b < FW / 2; b++) begin
      link_down_drv.strobe = 1; link_down_drv.d = f[b*2 +: 2]; @(negedge clk);
    end
    link_down_drv = LINK_IDLE;
  endtask

  initial begin
    logic [FW-1:0] f, r;
    logic [N*N-1:0] expect_state;
    sync_in = 0; load = 0; load_state = '0; link_down_drv = LINK_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    load = 1; load_state = {$urandom, $urandom};
    repeat (4) @(negedge clk);   // through the load synchroniser
    load = 0;
    repeat (70) @(negedge clk);
    chk(state == load_state, "pattern loaded");
    chk(pix_writes == 64, "load redraws the square");
    for (int g = 0; g < 12; g++) begin
      // draw the surroundings
      for (int rr = 0; rr < 24; rr++)
        for (int cc = 0; cc < 24; cc++)
          if (rr >= 8 && rr < 16 && cc >= 8 && cc < 16) world[rr][cc] = state[(rr-8)*N + (cc-8)];
          else world[rr][cc] = ($urandom_range(0, 2) == 0);
      // reference
      for (int rr = 0; rr < N; rr++)
        for (int cc = 0; cc < N; cc++) begin
          int cnt;
          cnt = 0;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              if (!(dr == 0 && dc == 0)) cnt += int'(world[rr+8+dr][cc+8+dc]);
          expect_state[rr*N + cc] = (cnt == 3) || (cnt == 2 && world[rr+8][cc+8]);
        end
      pix_writes = 0;
      sync_in = !sync_in;
      // exchange A
      get_frame(f);
      for (int k = 0; k < N; k++) begin
        chk(f[DIR_W*WORD_W + k] == world[8+k][8],  "A: west column out");
        chk(f[DIR_E*WORD_W + k] == world[8+k][15], "A: east column out");
      end
      chk(f[DIR_N*WORD_W +: WORD_W] == '0 && f[DIR_S*WORD_W +: WORD_W] == '0, "A: N/S words empty");
      r = '0;
      for (int k = 0; k < N; k++) begin
        r[DIR_W*WORD_W + k] = world[8+k][7];
        r[DIR_E*WORD_W + k] = world[8+k][16];
      end
      repeat (2) @(negedge clk);
      put_frame(r);
      // exchange B
      get_frame(f);
      for (int k = 0; k < N + 2; k++) begin
        chk(f[DIR_N*WORD_W + k] == world[8][7+k],  "B: north row out");
        chk(f[DIR_S*WORD_W + k] == world[15][7+k], "B: south row out");
      end
      r = '0;
      for (int k = 0; k < N + 2; k++) begin
        r[DIR_N*WORD_W + k] = world[7][7+k];
        r[DIR_S*WORD_W + k] = world[16][7+k];
      end
      if (g == 5) sync_in = !sync_in;   // early toggle: must be flagged
      repeat (2) @(negedge clk);
      put_frame(r);
      repeat (N * N + 12) @(negedge clk);
      chk(idle, "idle after the generation");
      chk(state == expect_state, $sformatf("generation %0d state %h expected %h halo %h %h %h %h", g, state, expect_state, dut.halo_n, dut.halo_s, dut.halo_w, dut.halo_e));
      chk(generation == 16'(g + 1), "generation counter");
      chk(pix_writes == N * N, "square redrawn");
      for (int p = 0; p < N * N; p++)
        chk(pixels[p] == (expect_state[p] ? LIVE : DEAD), "pixel colour");
      chk(overrun == (g >= 5), "overrun flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
