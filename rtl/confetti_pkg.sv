// confetti_pkg: types and constants shared by the CONFETTI tissue RTL.
//
// A CONFETTI machine is a 2-D grid of nodes. Each node is one ERouting
// FPGA with one ECell FPGA plugged on top of it. Neighbouring FPGAs talk
// over point-to-point serial links made of three differential pairs in
// each direction: one carries a clock, the other two (D0, D1) carry data.
// Here a link is the packed struct link_t: 'fclk' is the sender's clock,
// forwarded on the clock pair; 'strobe' is high while a frame's bits are
// on the data lanes; d[1:0] are the two data lanes. strobe and d change on
// the rising edge of fclk and are sampled on its falling edge. Every node
// has its own clock, so the receiver crosses into its own clock domain.
//
// The ECell application sees four 64-bit words per exchange, one per
// cardinal direction (as the platform description's communication module does).
// dir_e gives the index used for every direction-indexed array.
package confetti_pkg;

  // Width of one direction bus of the ECell communication module.
  localparam int unsigned WORD_W     = 64;
  // Data lanes per link direction (D0 and D1).
  localparam int unsigned LINK_LANES = 2;
  // Number of cardinal directions.
  localparam int unsigned NDIR       = 4;

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // One direction of a link: forwarded clock, frame strobe, data lanes.
  typedef struct packed {
    logic                  fclk;
    logic                  strobe;
    logic [LINK_LANES-1:0] d;
  } link_t;

  localparam link_t LINK_IDLE = '{fclk: 1'b0, strobe: 1'b0, d: '0};

  // Direction opposite to d (N<->S, E<->W).
  function automatic int unsigned opposite(input int unsigned d);
    return (d + 2) % NDIR;
  endfunction

endpackage
