// sync_relay_tb: self-checking test of sync_relay.
// For every source selection (four neighbours and the local generator) the
// testbench toggles random levels on all inputs every cycle and checks
// that sync_out equals the selected input three cycles later (two
// synchroniser flops plus the output register) and that event_out pulses
// exactly when the relayed level changes.
module sync_relay_tb;
  import confetti_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] src;
  logic [NDIR-1:0] nbr_sync;
  logic local_sync, sync_out, event_out;
  int checks = 0, failures = 0;
  int events = 0;

  sync_relay dut (.clk, .rst_n, .src, .nbr_sync, .local_sync, .sync_out, .event_out);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic sel_prev, out_prev;
    logic [2:0] hist;   // hist[k]: selected level k+1 cycles back
    src = 3'd4; nbr_sync = '0; local_sync = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    out_prev = 0;
    hist = '0;
    for (int s = 0; s <= 4; s++) begin
      for (int i = 0; i < 40; i++) begin
        logic expect_sel;
        @(negedge clk);
        src        = 3'(s);
        nbr_sync   = 4'($urandom);
        local_sync = 1'($urandom);
        expect_sel = (s == 4) ? local_sync : nbr_sync[s];
        @(posedge clk); #1;
        hist = {hist[1:0], expect_sel};
        chk(sync_out == hist[2], $sformatf("src %0d: relayed level", s));
        chk(event_out == (sync_out != out_prev), $sformatf("src %0d: event", s));
        if (event_out) events++;
        out_prev = sync_out;
      end
    end
    chk(events > 20, "events seen");
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
