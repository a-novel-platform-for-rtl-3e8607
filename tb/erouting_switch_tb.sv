// erouting_switch_tb: self-checking test of erouting_switch.
//  1. A frame of four words from the ECell must leave on the four
//     neighbour links, word d on link d, each a 32-beat frame.
//  2. Words from the neighbours, arriving at different times, must be
//     gathered into one frame to the ECell only when all four are in,
//     each word in its own slot, in arrival order per direction; two
//     words queued on one direction (FIFO full) must come out in order.
//  3. With the west port disabled, its slot must be zero and no frame may
//     leave westwards.
//  4. A third word on a full FIFO must set the sticky overflow flag.
module erouting_switch_tb;
  import confetti_pkg::*;
  localparam int unsigned FW = NDIR * WORD_W;

  logic clk = 0, rst_n = 0;
  logic [NDIR-1:0] port_en;
  link_t cell_up, cell_down, cell_up_drv;
  link_t [NDIR-1:0] nbr_in, nbr_out, nbr_in_drv;
  // the testbench changes its lanes on clk's falling edge and forwards the
  // inverted clock with them
  assign cell_up = '{fclk: !clk, strobe: cell_up_drv.strobe, d: cell_up_drv.d};
  always_comb
    for (int d = 0; d < NDIR; d++) nbr_in[d] = '{fclk: !clk, strobe: nbr_in_drv[d].strobe, d: nbr_in_drv[d].d};
  logic overflow, frame_up_seen, frame_down_sent;
  int checks = 0, failures = 0;

  erouting_switch dut (.clk, .rst_n, .port_en, .cell_up, .cell_down, .nbr_in, .nbr_out,
                       .overflow, .frame_up_seen, .frame_down_sent);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- monitors: rebuild frames from the output links ----
  logic [WORD_W-1:0] nq[NDIR][$];
  logic [FW-1:0]     cq[$];
  logic [NDIR-1:0][WORD_W-1:0] nacc;
  int nbeat[NDIR];
  logic [FW-1:0] cacc;
  int cbeat = 0;

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NDIR; d++) begin
      if (nbr_out[d].strobe) begin
        nacc[d][nbeat[d]*2 +: 2] = nbr_out[d].d;
        nbeat[d]++;
        if (nbeat[d] == WORD_W / 2) begin nq[d].push_back(nacc[d]); nbeat[d] = 0; end
      end
    end
    if (cell_down.strobe) begin
      cacc[cbeat*2 +: 2] = cell_down.d;
      cbeat++;
      if (cbeat == FW / 2) begin cq.push_back(cacc); cbeat = 0; end
    end
  end

  // ---- drivers ----
  task automatic send_cell(input logic [FW-1:0] f);
    for (int b = 0; b < FW / 2; b++) begin
      @(negedge clk); cell_up_drv.strobe = 1; cell_up_drv.d = f[b*2 +: 2];
    end
    @(negedge clk); cell_up_drv = LINK_IDLE;
  endtask

  task automatic send_nbr(input int d, input logic [WORD_W-1:0] w);
    for (int b = 0; b < WORD_W / 2; b++) begin
      @(negedge clk); nbr_in_drv[d].strobe = 1; nbr_in_drv[d].d = w[b*2 +: 2];
    end
    @(negedge clk); nbr_in_drv[d] = LINK_IDLE;
  endtask

  logic [FW-1:0] f;
  logic [NDIR-1:0][WORD_W-1:0] w1, w2;

  initial begin
    for (int d = 0; d < NDIR; d++) nbeat[d] = 0;
    port_en = 4'b1111;
    cell_up_drv = LINK_IDLE;
    nbr_in_drv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. upward split
    for (int i = 0; i < 8; i++) f[i*32 +: 32] = $urandom;
    send_cell(f);
    repeat (WORD_W / 2 + 12) @(posedge clk);
    for (int d = 0; d < NDIR; d++) begin
      chk(nq[d].size() == 1, $sformatf("one frame on link %0d", d));
      if (nq[d].size() > 0) chk(nq[d].pop_front() == f[d*WORD_W +: WORD_W], $sformatf("word on link %0d", d));
    end

    // 2. gathering, staggered arrivals, two words queued on north
    for (int d = 0; d < NDIR; d++) begin w1[d] = {$urandom, $urandom}; w2[d] = {$urandom, $urandom}; end
    send_nbr(DIR_N, w1[DIR_N]);
    send_nbr(DIR_N, w2[DIR_N]);
    fork
      send_nbr(DIR_E, w1[DIR_E]);
      send_nbr(DIR_S, w1[DIR_S]);
    join
    repeat (10) @(posedge clk);
    chk(cq.size() == 0 && cbeat == 0, "no frame before all four words are in");
    send_nbr(DIR_W, w1[DIR_W]);
    repeat (FW / 2 + 12) @(posedge clk);
    chk(cq.size() == 1, "first gathered frame");
    if (cq.size() > 0) chk(cq.pop_front() == w1, "first gathered frame contents");
    fork
      send_nbr(DIR_E, w2[DIR_E]);
      send_nbr(DIR_S, w2[DIR_S]);
      send_nbr(DIR_W, w2[DIR_W]);
    join
    repeat (FW / 2 + 12) @(posedge clk);
    chk(cq.size() == 1, "second gathered frame");
    if (cq.size() > 0) chk(cq.pop_front() == w2, "second frame: queued north word kept its order");
    chk(!overflow, "no overflow so far");

    // 3. west border disabled
    port_en = 4'b0111;
    for (int i = 0; i < 8; i++) f[i*32 +: 32] = $urandom;
    send_cell(f);
    repeat (WORD_W / 2 + 12) @(posedge clk);
    chk(nq[DIR_W].size() == 0, "nothing sent west on a disabled port");
    for (int d = 0; d < 3; d++) begin
      chk(nq[d].size() == 1, $sformatf("frame on enabled link %0d", d));
      void'(nq[d].pop_front());
    end
    for (int d = 0; d < NDIR; d++) w1[d] = {$urandom, $urandom};
    fork
      send_nbr(DIR_N, w1[DIR_N]);
      send_nbr(DIR_E, w1[DIR_E]);
      send_nbr(DIR_S, w1[DIR_S]);
    join
    repeat (FW / 2 + 12) @(posedge clk);
    w1[DIR_W] = '0;
    chk(cq.size() == 1, "frame with a disabled port");
    if (cq.size() > 0) chk(cq.pop_front() == w1, "disabled port slot is zero");

    // 4. overflow: three words north while east is missing
    port_en = 4'b1111;
    send_nbr(DIR_N, 64'h1);
    send_nbr(DIR_N, 64'h2);
    chk(!overflow, "two queued words do not overflow");
    send_nbr(DIR_N, 64'h3);
    repeat (6) @(posedge clk);
    chk(overflow, "third word sets overflow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
