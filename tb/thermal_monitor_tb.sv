// thermal_monitor_tb: self-checking test of thermal_monitor (18 sensors,
// fans on at 60 C, off below 50 C).
// Drives random readings, checks max_temp and hot_sensor one cycle later
// against a maximum computed in the testbench, then ramps one sensor up
// and down and checks the fan switches on at 60, stays on between 50 and
// 59 and switches off at 49.
module thermal_monitor_tb;
  localparam int unsigned NS = 18;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0][7:0] temp;
  logic [7:0] max_temp;
  logic [4:0] hot_sensor;
  logic fan_on;
  int checks = 0, failures = 0;

  thermal_monitor #(.NS(NS)) dut (.clk, .rst_n, .temp, .max_temp, .hot_sensor, .fan_on);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic set_all(input int t);
    for (int i = 0; i < NS; i++) temp[i] = 8'(t);
  endtask

  initial begin
    set_all(25);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // maximum search
    for (int it = 0; it < 100; it++) begin
      int m, mi;
      @(negedge clk);
      for (int i = 0; i < NS; i++) temp[i] = 8'($urandom_range(20, 45));
      m = -1; mi = 0;
      for (int i = 0; i < NS; i++) if (int'(temp[i]) > m) begin m = temp[i]; mi = i; end
      @(negedge clk);
      chk(max_temp == 8'(m), $sformatf("max %0d got %0d", m, max_temp));
      chk(hot_sensor == 5'(mi), $sformatf("hot sensor %0d got %0d", mi, hot_sensor));
      chk(!fan_on, "fan off below thresholds");
    end
    // ramp sensor 7 up then down
    set_all(30);
    for (int t = 40; t <= 70; t++) begin
      @(negedge clk); temp[7] = 8'(t);
      repeat (2) @(negedge clk);
      chk(fan_on == (t >= 60), $sformatf("ramp up at %0d: fan %0d", t, fan_on));
    end
    for (int t = 70; t >= 40; t--) begin
      @(negedge clk); temp[7] = 8'(t);
      repeat (2) @(negedge clk);
      chk(fan_on == (t >= 50), $sformatf("ramp down at %0d: fan %0d", t, fan_on));
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
