// thermal_monitor: turns an EStack's fans on when its temperature rises.
//
// Every cycle the highest of the NS sensor readings (unsigned degrees
// Celsius) is registered as max_temp. fan_on switches on when max_temp
// reaches T_ON and off again only when it falls below T_OFF; the gap
// keeps the fans from chattering around one threshold. hot_sensor gives
// the index of (the lowest-numbered) sensor holding the maximum.
// Outputs follow the readings by one cycle (max_temp, hot_sensor) and
// two cycles (fan_on).
//
// The CONFETTI platform description says each ECell carries a temperature measurement chip and
// that fans cool the system should a rise in temperature be detected. The
// sensor interface (parallel readings), the thresholds and the hysteresis
// are this design's own.
module thermal_monitor #(
  parameter int unsigned NS    = 18,
  parameter logic [7:0]  T_ON  = 8'd60,
  parameter logic [7:0]  T_OFF = 8'd50,
  parameter int unsigned IW    = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NS-1:0][7:0]   temp,
  output logic [7:0]           max_temp,
  output logic [IW-1:0]        hot_sensor,
  output logic                 fan_on
);
  logic [7:0]    m;
  logic [IW-1:0] mi;

  always_comb begin
    m  = temp[0];
    mi = '0;
    for (int i = 1; i < NS; i++) begin
      if (temp[i] > m) begin
        m  = temp[i];
        mi = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_temp   <= '0;
      hot_sensor <= '0;
      fan_on     <= 1'b0;
    end else begin
      max_temp   <= m;
      hot_sensor <= mi;
      if (max_temp >= T_ON)      fan_on <= 1'b1;
      else if (max_temp < T_OFF) fan_on <= 1'b0;
    end
  end

endmodule
