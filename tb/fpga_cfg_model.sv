// fpga_cfg_model: behavioural model of an FPGA's slave-serial configuration
// pins, for testbenches only. prog_b low clears it and holds init_b low;
// INIT_DELAY cycles after prog_b rises, init_b goes high. Each rising cclk
// edge then takes one din bit (most significant bit of each byte first)
// into 'bytes'. DONE_AFTER_BITS bits plus DONE_EXTRA more cclk edges later
// 'done' rises, unless 'never_done' is set.
module fpga_cfg_model #(
  parameter int unsigned MAX_BYTES       = 4096,
  parameter int unsigned DONE_AFTER_BITS = 8 * 200,
  parameter int unsigned DONE_EXTRA      = 4,
  parameter int unsigned INIT_DELAY      = 10
) (
  input  logic clk,
  input  logic prog_b,
  input  logic cclk,
  input  logic din,
  input  logic never_done,
  output logic init_b,
  output logic done
);
  logic [7:0] bytes [MAX_BYTES];
  int bits = 0;
  int edges = 0;
  int init_cnt = 0;
  logic cclk_q = 0;
  logic [7:0] sh;

  always @(posedge clk) begin
    cclk_q <= cclk;
    if (!prog_b) begin
      bits <= 0; edges <= 0; init_cnt <= 0; init_b <= 0; done <= 0;
    end else begin
      if (init_cnt < INIT_DELAY) init_cnt <= init_cnt + 1;
      else init_b <= 1;
      if (cclk && !cclk_q) begin
        edges <= edges + 1;
        if (bits < DONE_AFTER_BITS) begin
          sh = {sh[6:0], din};
          if (bits % 8 == 7 && bits / 8 < MAX_BYTES) bytes[bits / 8] <= sh;
          bits <= bits + 1;
        end
        if (edges + 1 >= DONE_AFTER_BITS + DONE_EXTRA && !never_done) done <= 1;
      end
    end
  end

  initial begin init_b = 0; done = 0; end
endmodule
