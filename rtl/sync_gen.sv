// sync_gen: source of the global synchronisation signal.
//
// One node of the machine derives the global "next generation" signal from
// its local clock. While 'run' is high, sync_level toggles every PERIOD
// clock cycles; every toggle (either edge) is one synchronisation event.
// A level that toggles, rather than a one-cycle pulse, can be relayed from
// FPGA to FPGA through registers and seen reliably as an edge by every
// receiver, whatever its distance from the source. 'tick' pulses in the
// cycle sync_level changes.
//
// The CONFETTI platform description says the global signal is generated by one of the clock
// generators and propagated through the ERouting FPGAs; the toggle
// encoding and PERIOD are this design's own (PERIOD must exceed the time
// one generation takes, see ecell_gol).
module sync_gen #(
  parameter int unsigned PERIOD = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic sync_level,
  output logic tick
);
  localparam int unsigned CW = $clog2(PERIOD + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      sync_level <= 1'b0;
      tick       <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (!run) begin
        cnt <= '0;
      end else if (cnt == CW'(PERIOD - 1)) begin
        cnt        <= '0;
        sync_level <= !sync_level;
        tick       <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
