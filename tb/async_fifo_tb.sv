// async_fifo_tb: self-checking test of the dual-clock FIFO.
// The writer runs at 7 ns and the reader at 11 ns. Phase 1 fills the FIFO
// with the reader stopped and checks that wr_full rises after exactly
// DEPTH words. Phase 2 writes and reads at random (each side acts on about
// half of its cycles) and checks every word that comes out against a
// queue of the words written, in order, with none lost or repeated.
module async_fifo_tb;
  localparam int unsigned W = 16, DEPTH = 4, WORDS = 400;

  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en, wr_full, rd_en, rd_empty;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] sent[$];
  int checks = 0, failures = 0, n_read = 0, n_full = 0;
  bit reading = 0;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .rst_n, .wclk, .wr_en, .wr_data, .wr_full, .rclk, .rd_en, .rd_data, .rd_empty);

  always #3.5 wclk = !wclk;
  always #5.5 rclk = !rclk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reader: pops at random while enabled and checks each word
  always @(negedge rclk) rd_en <= reading && ($urandom_range(0, 1) == 1);
  always @(posedge rclk) if (rst_n && rd_en && !rd_empty) begin
    logic [W-1:0] e;
    if (sent.size() == 0) chk(0, "word read that was never written");
    else begin
      e = sent.pop_front();
      chk(rd_data == e, $sformatf("read %h expected %h", rd_data, e));
    end
    n_read++;
  end
  always @(posedge wclk) if (rst_n && wr_full) n_full++;

  task automatic put(input logic [W-1:0] v);
    // wr_full only changes on wclk's rising edge, so it can be read here
    @(negedge wclk);
    wr_en = 1; wr_data = v;
    if (!wr_full) sent.push_back(v);
    @(negedge wclk) wr_en = 0;
  endtask

  initial begin
    int n;
    wr_en = 0; wr_data = '0; rd_en = 0;
    #20 rst_n = 1;
    // phase 1: fill with the reader stopped
    for (int i = 0; i < DEPTH; i++) begin
      chk(!wr_full, $sformatf("not full after %0d words", i));
      put(W'(i + 1));
    end
    repeat (2) @(negedge wclk);
    chk(wr_full, "full after DEPTH words");
    // phase 2: random traffic in both directions
    reading = 1;
    n = 0;
    while (n < WORDS) begin
      @(negedge wclk);
      wr_en = ($urandom_range(0, 1) == 1);
      wr_data = W'($urandom);
      if (wr_en && !wr_full) begin sent.push_back(wr_data); n++; end
    end
    @(negedge wclk) wr_en = 0;
    // drain
    repeat (40) @(posedge rclk);
    chk(sent.size() == 0, $sformatf("%0d words never came out", sent.size()));
    chk(n_read == WORDS + DEPTH, $sformatf("%0d words read", n_read));
    chk(n_full > 0, "writer saw a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
