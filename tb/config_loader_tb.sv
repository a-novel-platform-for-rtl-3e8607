// config_loader_tb: self-checking test of config_loader, scaled down to a
// 1 Kbyte Flash with four 256-byte slots and a 200-byte configuration.
// For each slot the loader must pulse prog_b, wait for init_b, shift the
// slot's 200 bytes into the FPGA model bit-exactly and report ok when the
// model raises done; the load must take the expected number of cycles.
// A model that never raises done must give 'error' after DONE_CLKS extra
// clocks.
module config_loader_tb;
  localparam int unsigned AW = 10, SLOTS = 4, SLOT_BYTES = 256, CFG = 200;
  localparam int unsigned WAIT = 6, PROG = 32, DONE_CLKS = 64, INIT_DELAY = 10, EXTRA = 4;

  logic clk = 0, rst_n = 0;
  logic start, busy, ok, error;
  logic [1:0] slot;
  logic [AW-1:0] flash_addr;
  logic flash_oe_n;
  logic [7:0] flash_data;
  logic prog_b, cclk, din, init_b, done, never_done;
  int checks = 0, failures = 0;

  config_loader #(.FLASH_AW(AW), .NUM_SLOTS(SLOTS), .SLOT_BYTES(SLOT_BYTES), .CFG_BYTES(CFG),
                  .FLASH_WAIT(WAIT), .PROG_CYCLES(PROG), .DONE_CLKS(DONE_CLKS)) dut (
    .clk, .rst_n, .start, .slot, .busy, .ok, .error,
    .flash_addr, .flash_oe_n, .flash_data, .prog_b, .cclk, .din, .init_b, .done);

  flash_model #(.AW(AW), .WAIT(WAIT)) u_flash (.clk, .addr(flash_addr), .oe_n(flash_oe_n), .data(flash_data));

  fpga_cfg_model #(.MAX_BYTES(CFG), .DONE_AFTER_BITS(8 * CFG), .DONE_EXTRA(EXTRA), .INIT_DELAY(INIT_DELAY))
    u_fpga (.clk, .prog_b, .cclk, .din, .never_done, .init_b, .done);

  always #5 clk = !clk;

  task automatic chk(input bit ok_, input string msg);
    checks++;
    if (!ok_) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] content(input int a);
    return 8'(a * 37) ^ 8'(a >> 8) ^ 8'h3C;
  endfunction

  initial begin
    int cycles, bad, prog_low;
    start = 0; slot = '0; never_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < SLOTS; s++) begin
      @(negedge clk); start = 1; slot = 2'(s);
      @(negedge clk); start = 0;
      chk(busy, "busy after start");
      cycles = 1; prog_low = prog_b ? 0 : 1;
      while (busy && cycles < 100000) begin
        @(negedge clk); cycles++;
        if (!prog_b) prog_low++;
      end
      chk(ok && !error, $sformatf("slot %0d: ok", s));
      chk(prog_low == PROG, $sformatf("prog_b low for %0d cycles", prog_low));
      bad = 0;
      for (int b = 0; b < CFG; b++)
        if (u_fpga.bytes[b] != content(s * SLOT_BYTES + b)) bad++;
      chk(bad == 0, $sformatf("slot %0d: %0d bytes wrong", s, bad));
      // PROG, then INIT_DELAY+1 waiting for init_b, then per byte WAIT flash
      // cycles and 16 shift cycles, then 2*EXTRA clock cycles until done.
      chk(cycles >= PROG + INIT_DELAY + CFG * (WAIT + 16) &&
          cycles <= PROG + INIT_DELAY + CFG * (WAIT + 16) + 2 * EXTRA + 6,
          $sformatf("slot %0d: load took %0d cycles", s, cycles));
    end
    // no done: error
    never_done = 1;
    @(negedge clk); start = 1; slot = 2'd1;
    @(negedge clk); start = 0;
    cycles = 0;
    while (busy && cycles < 100000) begin @(negedge clk); cycles++; end
    chk(error && !ok, "error when done never rises");
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
