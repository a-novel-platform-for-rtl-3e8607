// sync_gen_tb: self-checking test of sync_gen with PERIOD = 20.
// Checks that sync_level stays put while 'run' is low, then toggles every
// PERIOD cycles exactly (measured between toggles), with 'tick' high in
// exactly the cycles in which it changes, and stops again when run drops.
module sync_gen_tb;
  localparam int unsigned PERIOD = 20;
  logic clk = 0, rst_n = 0, run;
  logic sync_level, tick;
  int checks = 0, failures = 0;

  sync_gen #(.PERIOD(PERIOD)) dut (.clk, .rst_n, .run, .sync_level, .tick);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic prev;
  int   last_toggle, cyc, toggles;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    #1;
    if (sync_level != prev) begin
      chk(tick, "tick with the toggle");
      if (toggles > 0) chk(cyc - last_toggle == PERIOD, $sformatf("period %0d", cyc - last_toggle));
      last_toggle = cyc;
      toggles++;
    end else begin
      chk(!tick, "no tick without a toggle");
    end
    prev = sync_level;
  end

  initial begin
    cyc = 0; toggles = 0; prev = 0; last_toggle = 0;
    run = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3 * PERIOD) @(posedge clk);
    chk(toggles == 0, "no toggle while stopped");
    @(negedge clk) run = 1;
    repeat (10 * PERIOD + 2) @(posedge clk);
    chk(toggles == 10, $sformatf("10 toggles, saw %0d", toggles));
    @(negedge clk) run = 0;
    repeat (3 * PERIOD) @(posedge clk);
    chk(toggles == 10, "no toggle after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
