// link_tb: self-checking test of link_tx.
// Sends random 64-bit words (some back to back, some with idle gaps) and
// rebuilds each frame from the link lanes in the testbench itself, checking
// the data, the frame length (W/2 beats with strobe high, contiguous) and
// that in_ready stays low until the frame's last beat.
module link_tb;
  import confetti_pkg::*;
  localparam int unsigned W = 64;
  localparam int unsigned BEATS = W / LINK_LANES;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [W-1:0] in_data;
  link_t link;
  int checks = 0, failures = 0;

  link_tx #(.W(W)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .link);

  always #5 clk = !clk;

  // Expected words, in order.
  logic [W-1:0] expq[$];
  logic [W-1:0] cur;
  int beat = 0;
  int frames = 0;

  always @(posedge clk) if (rst_n) begin
    if (link.strobe) begin
      cur[beat*2 +: 2] = link.d;
      beat++;
      checks++;
      if (in_ready && beat < BEATS) begin failures++; $display("FAIL: in_ready high during frame"); end
      if (beat == BEATS) begin
        logic [W-1:0] e;
        e = expq.pop_front();
        checks++;
        if (cur !== e) begin failures++; $display("FAIL: frame %h expected %h", cur, e); end
        beat = 0;
        frames++;
      end
    end else if (beat != 0) begin
      failures++; checks++;
      $display("FAIL: strobe dropped after %0d beats", beat);
      beat = 0;
    end
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      int gap;
      @(negedge clk);
      in_valid = 1;
      in_data  = {$urandom, $urandom};
      if (i == 0) in_data = 64'h8000_0000_0000_0001;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      expq.push_back(in_data);
      @(negedge clk);
      in_valid = 0;
      gap = (i % 3 == 0) ? 0 : $urandom_range(0, 5);
      repeat (gap) @(posedge clk);
    end
    repeat (2 * BEATS) @(posedge clk);
    checks++;
    if (frames != 40) begin failures++; $display("FAIL: %0d frames seen", frames); end
    // one frame takes exactly BEATS cycles of strobe: measure it
    begin
      int t0, t1;
      @(negedge clk); in_valid = 1; in_data = 64'hDEAD_BEEF_0123_4567; expq.push_back(in_data);
      @(posedge clk); #1 in_valid = 0;
      wait (link.strobe); t0 = $time;
      wait (!link.strobe); t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != BEATS) begin failures++; $display("FAIL: frame lasted %0d cycles", (t1 - t0) / 10); end
    end
    repeat (4) @(posedge clk);
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
