// erouting_fpga_tb: self-checking test of one ERouting FPGA node.
// Two nodes are used: A generates the synchronisation level (SYNC_SRC = 4,
// period 16 cycles) and B takes it from its east neighbour, which is A.
// Checks: A's level toggles every 16 cycles and B follows three cycles
// later (its synchroniser and output register);
// a four-word frame from A's ECell is split onto the four neighbour links;
// words from four neighbours come back to A's ECell as one frame; and a
// configuration slot is loaded from a Flash model into an FPGA model.
module erouting_fpga_tb;
  import confetti_pkg::*;
  localparam int unsigned FW = NDIR * WORD_W;
  localparam int unsigned AW = 10, SLOTS = 4, SLOT_BYTES = 256, CFG = 64;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  link_t cell_up, cell_down, cell_up_drv;
  link_t [NDIR-1:0] nin, nout, nout_b, nin_drv;
  // the testbench changes its lanes on clk's falling edge and forwards the
  // inverted clock with them
  assign cell_up = '{fclk: !clk, strobe: cell_up_drv.strobe, d: cell_up_drv.d};
  always_comb
    for (int d = 0; d < NDIR; d++) nin[d] = '{fclk: !clk, strobe: nin_drv[d].strobe, d: nin_drv[d].d};
  logic sync_a, sync_b, run;
  logic cfg_start, cfg_busy, cfg_ok, cfg_error;
  logic [1:0] cfg_slot;
  logic [AW-1:0] flash_addr;
  logic flash_oe_n, prog_b, cclk, din, init_b, done;
  logic [7:0] flash_data;
  logic ovf_a, ovf_b, up_a, down_a, ev_a, ev_b;

  erouting_fpga #(.SYNC_SRC(4), .SYNC_PERIOD(16), .FLASH_AW(AW), .NUM_SLOTS(SLOTS),
                  .SLOT_BYTES(SLOT_BYTES), .CFG_BYTES(CFG)) u_a (
    .clk, .rst_n, .port_en(4'b1111), .cell_up, .cell_down, .nbr_in(nin), .nbr_out(nout),
    .sync_in(4'b0000), .sync_out(sync_a), .sync_run(run),
    .cfg_start, .cfg_slot, .cfg_busy, .cfg_ok, .cfg_error,
    .flash_addr, .flash_oe_n, .flash_data, .prog_b, .cclk, .din, .init_b, .done,
    .overflow(ovf_a), .frame_up_seen(up_a), .frame_down_sent(down_a), .sync_event(ev_a));

  erouting_fpga #(.SYNC_SRC(int'(DIR_E)), .SYNC_PERIOD(16), .FLASH_AW(AW), .NUM_SLOTS(SLOTS),
                  .SLOT_BYTES(SLOT_BYTES), .CFG_BYTES(CFG)) u_b (
    .clk, .rst_n, .port_en(4'b0000), .cell_up(LINK_IDLE), .cell_down(),
    .nbr_in('0), .nbr_out(nout_b),
    .sync_in({1'b0, 1'b0, sync_a, 1'b0}), .sync_out(sync_b), .sync_run(run),
    .cfg_start(1'b0), .cfg_slot(2'd0), .cfg_busy(), .cfg_ok(), .cfg_error(),
    .flash_addr(), .flash_oe_n(), .flash_data(8'd0), .prog_b(), .cclk(), .din(),
    .init_b(1'b1), .done(1'b0),
    .overflow(ovf_b), .frame_up_seen(), .frame_down_sent(), .sync_event(ev_b));

  flash_model #(.AW(AW), .WAIT(6)) u_flash (.clk, .addr(flash_addr), .oe_n(flash_oe_n), .data(flash_data));
  fpga_cfg_model #(.MAX_BYTES(CFG), .DONE_AFTER_BITS(8 * CFG)) u_fpga (
    .clk, .prog_b, .cclk, .din, .never_done(1'b0), .init_b, .done);

  // sync monitor
  logic sa_q, sb_q;
  int ta, tb_, na = 0, nb = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (sync_a != sa_q) begin
      if (na > 0) chk(cyc - ta == 16, "source period");
      ta = cyc; na++;
    end
    if (sync_b != sb_q) begin
      chk(cyc - ta == 3, "neighbour follows three cycles later");
      nb++;
    end
    sa_q <= sync_a; sb_q <= sync_b;
  end

  function automatic logic [7:0] content(input int a);
    return 8'(a * 37) ^ 8'(a >> 8) ^ 8'h3C;
  endfunction

  initial begin
    logic [FW-1:0] f, g;
    logic [NDIR-1:0][WORD_W-1:0] w;
    int b;
    sa_q = 0; sb_q = 0;
    cell_up_drv = LINK_IDLE; nin_drv = '0; run = 0; cfg_start = 0; cfg_slot = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) run = 1;
    // frame up
    for (int i = 0; i < 8; i++) f[i*32 +: 32] = $urandom;
    for (b = 0; b < FW / 2; b++) begin
      @(negedge clk); cell_up_drv.strobe = 1; cell_up_drv.d = f[b*2 +: 2];
    end
    @(negedge clk); cell_up_drv = LINK_IDLE;
    // collect the four neighbour frames
    for (int d = 0; d < NDIR; d++) w[d] = '0;
    b = 0;
    while (!nout[0].strobe) @(negedge clk);
    while (nout[0].strobe) begin
      for (int d = 0; d < NDIR; d++) w[d][b*2 +: 2] = nout[d].d;
      b++;
      @(negedge clk);
    end
    for (int d = 0; d < NDIR; d++) chk(w[d] == f[d*WORD_W +: WORD_W], $sformatf("word to neighbour %0d", d));
    // words from the neighbours, back to the ECell
    for (int d = 0; d < NDIR; d++) w[d] = {$urandom, $urandom};
    for (b = 0; b < WORD_W / 2; b++) begin
      for (int d = 0; d < NDIR; d++) begin nin_drv[d].strobe = 1; nin_drv[d].d = w[d][b*2 +: 2]; end
      @(negedge clk);
    end
    nin_drv = '0;
    b = 0;
    while (!cell_down.strobe) @(negedge clk);
    while (cell_down.strobe) begin g[b*2 +: 2] = cell_down.d; b++; @(negedge clk); end
    chk(g == w, "gathered frame to the ECell");
    // configuration
    cfg_slot = 2'd2; cfg_start = 1;
    @(negedge clk) cfg_start = 0;
    while (cfg_busy) @(negedge clk);
    chk(cfg_ok && !cfg_error, "configuration ok");
    b = 0;
    for (int i = 0; i < CFG; i++) if (u_fpga.bytes[i] != content(2 * SLOT_BYTES + i)) b++;
    chk(b == 0, $sformatf("%0d configuration bytes wrong", b));
    chk(na > 20 && (nb == na || nb == na - 1), $sformatf("sync toggles %0d / %0d", na, nb));
    chk(!ovf_a && !ovf_b, "no overflow");
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
