// link_rx_tb: self-checking test of link_rx.
// The testbench serialises random 64-bit words itself (two bits per cycle,
// least significant first, strobe high during the frame) on its own
// sending clock tclk (13 ns, unrelated to the receiver's 10 ns clk),
// including one frame broken off early. It checks that each complete frame
// comes out once, intact, within five receiver cycles of its end, and the
// broken one never.
module link_rx_tb;
  import confetti_pkg::*;
  localparam int unsigned W = 64;
  localparam int unsigned BEATS = W / LINK_LANES;

  logic clk = 0, tclk = 0, rst_n = 0;
  link_t link, link_drv;
  logic out_valid;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0;
  int got = 0;
  logic [W-1:0] expq[$];

  link_rx #(.W(W)) dut (.clk, .rst_n, .link, .out_valid, .out_data);

  always #5 clk = !clk;
  always #6.5 tclk = !tclk;
  // the data change on tclk's falling edge, so forward the inverted clock
  assign link = '{fclk: !tclk, strobe: link_drv.strobe, d: link_drv.d};

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [W-1:0] e;
    checks++;
    got++;
    if (expq.size() == 0) begin failures++; $display("FAIL: unexpected word %h", out_data); end
    else begin
      e = expq.pop_front();
      if (out_data !== e) begin failures++; $display("FAIL: got %h expected %h", out_data, e); end
    end
  end

  task automatic send(input logic [W-1:0] w, input int nbeats);
    for (int b = 0; b < nbeats; b++) begin
      @(negedge tclk);
      link_drv.strobe = 1'b1;
      link_drv.d      = w[b*2 +: 2];
    end
    @(negedge tclk);
    link_drv = LINK_IDLE;
  endtask

  initial begin
    link_drv = LINK_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      logic [W-1:0] w;
      w = {$urandom, $urandom};
      if (i == 10) begin
        send(w, BEATS / 2);          // broken frame: must be dropped
      end else begin
        expq.push_back(w);
        send(w, BEATS);
        // the word must come out within five receiver cycles
        begin
          int lat;
          lat = 0;
          while (!out_valid && lat < 8) begin @(posedge clk); #1; lat++; end
          checks++;
          if (lat < 1 || lat > 5) begin failures++; $display("FAIL: word out %0d cycles after the frame", lat); end
        end
      end
      repeat ($urandom_range(0, 3)) @(posedge tclk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != 29 || expq.size() != 0) begin failures++; $display("FAIL: %0d words received", got); end
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
