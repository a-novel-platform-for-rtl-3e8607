// display_tile_tb: self-checking test of display_tile.
// Writes random 24-bit pixels to all 64 addresses, reads them back with a
// one-cycle read latency, and checks read-during-write of another address
// and overwrites against a model array kept in the testbench. The write
// clock and the read clock are separate (the read clock lags by 2 ns).
module display_tile_tb;
  localparam int unsigned N = 8;
  logic clk = 0, rclk = 0;
  logic we;
  logic [5:0] waddr, raddr;
  logic [23:0] wdata, rdata;
  logic [23:0] model [64];
  int checks = 0, failures = 0;

  display_tile #(.N(N)) dut (.wclk(clk), .we, .waddr, .wdata, .rclk, .raddr, .rdata);

  always #5 clk = !clk;
  initial begin #2; forever #5 rclk = !rclk; end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = 24'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 64; i++) begin
        int a;
        a = (pass == 0) ? i : int'($urandom_range(0, 63));
        @(negedge clk);
        raddr = 6'(a);
        // concurrently overwrite a different pixel
        we = (pass > 0);
        waddr = 6'((a + 1 + $urandom_range(0, 61)) % 64);
        wdata = 24'($urandom);
        @(posedge clk);
        if (we) model[waddr] = wdata;
        @(negedge clk);
        we = 0;
        chk(rdata == model[a], $sformatf("pixel %0d", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
