// flash_model: behavioural model of a byte-wide parallel Flash read port,
// for testbenches only. Byte a holds ((a * 37) ^ (a >> 8) ^ SEED) & 0xFF.
// Data are valid only once the address has been stable and oe_n low for
// WAIT cycles; before that the port returns 8'hA5 ^ address bits, so a
// reader that samples too early gets wrong data.
module flash_model #(
  parameter int unsigned AW   = 21,
  parameter int unsigned WAIT = 6,
  parameter logic [7:0]  SEED = 8'h3C
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          oe_n,
  output logic [7:0]    data
);
  logic [AW-1:0] addr_q;
  int stable = 0;

  function automatic logic [7:0] content(input logic [AW-1:0] a);
    return 8'(32'(a) * 37) ^ 8'(a >> 8) ^ SEED;
  endfunction

  always @(posedge clk) begin
    if (oe_n || addr != addr_q) stable <= 0;
    else if (stable < 1000) stable <= stable + 1;
    addr_q <= addr;
  end

  // 'stable' counts completed cycles with this address; the reader samples
  // at the end of its WAIT-th cycle.
  assign data = (!oe_n && addr == addr_q && stable >= WAIT - 2) ? content(addr) : (8'hA5 ^ 8'(addr));
endmodule
