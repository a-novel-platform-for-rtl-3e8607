// ecell_comm_tb: self-checking test of ecell_comm.
// Hands random direction words to the module and rebuilds the outgoing
// frame from the link lanes (word d in bits d*64 .. d*64+63, two bits per
// cycle, 128 beats); then serialises a reply frame in the testbench and
// checks that the four received words appear with one 'done' pulse.
module ecell_comm_tb;
  import confetti_pkg::*;
  localparam int unsigned FW = NDIR * WORD_W;

  logic clk = 0, rst_n = 0;
  logic start, ready, done;
  logic [NDIR-1:0][WORD_W-1:0] out_word, in_word;
  link_t link_up, link_down, link_down_drv;
  // the testbench changes its lanes on clk's falling edge and forwards the
  // inverted clock with them
  assign link_down = '{fclk: !clk, strobe: link_down_drv.strobe, d: link_down_drv.d};
  int checks = 0, failures = 0;
  int done_count = 0;

  ecell_comm dut (.clk, .rst_n, .start, .ready, .out_word, .done, .in_word, .link_up, .link_down);

  always #5 clk = !clk;
  always @(posedge clk) if (rst_n && done) done_count++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [FW-1:0] frame, reply;
    int beats;
    start = 0; out_word = '0; link_down_drv = LINK_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 6; it++) begin
      @(negedge clk);
      for (int d = 0; d < NDIR; d++) out_word[d] = {$urandom, $urandom};
      chk(ready, "ready before start");
      start = 1;
      @(negedge clk);
      start = 0;
      // collect the outgoing frame
      beats = 0;
      while (!link_up.strobe) @(negedge clk);
      while (link_up.strobe) begin
        frame[beats*2 +: 2] = link_up.d;
        beats++;
        @(negedge clk);
      end
      chk(beats == FW / LINK_LANES, $sformatf("frame beats %0d", beats));
      for (int d = 0; d < NDIR; d++)
        chk(frame[d*WORD_W +: WORD_W] == out_word[d], $sformatf("outgoing word %0d", d));
      // reply
      reply = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < FW / LINK_LANES; b++) begin
        link_down_drv.strobe = 1; link_down_drv.d = reply[b*2 +: 2];
        @(negedge clk);
      end
      link_down_drv = LINK_IDLE;
      repeat (6) @(negedge clk);
      chk(done_count == it + 1, $sformatf("done pulses %0d", done_count));
      for (int d = 0; d < NDIR; d++)
        chk(in_word[d] == reply[d*WORD_W +: WORD_W], $sformatf("incoming word %0d", d));
    end
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
