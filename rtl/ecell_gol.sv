// ecell_gol: an ECell FPGA configured as one N x N tile of a machine-wide
// synchronous Game of Life.
//
// Each toggle of the global synchronisation level (sync_in) starts one
// generation:
//   1. Exchange A: the east and west edge columns are sent to the east and
//      west neighbours (through ecell_comm and the ERouting FPGA) and the
//      neighbours' facing columns come back as the west/east halo.
//   2. Exchange B: the north and south edge rows, each extended on both
//      ends by the halo cells just received, go to the north and south
//      neighbours; their extended rows come back as the north/south halo.
//      Passing the corners along in the second exchange gives every cell
//      its diagonal neighbours without any diagonal link.
//   3. Step: the whole tile takes its next generation in one clock.
//   4. Draw: the N*N pixels of the tile's display square are rewritten,
//      one per cycle (LIVE_RGB for a live cell, DEAD_RGB for a dead one).
// Then the tile waits for the next toggle. A toggle that arrives before
// the generation is finished is dropped and sets the sticky 'overrun' flag.
// While idle, a rising edge of 'load' replaces the tile state with
// load_state and redraws; load_state must be held steady meanwhile.
// sync_in and load may come from other clock domains: both pass a
// two-flop synchroniser first (two cycles of latency).
// Word layout on the direction buses (bit 0 first): exchange A carries the
// N column bits, row 0 first; exchange B carries N+2 bits, column -1 first.
//
// The CONFETTI platform description gives the experiment: N x N cells per ECell, four 64-bit
// direction buses, one global synchronisation signal. The two-phase halo
// exchange, the colours and the load port are this design's own.
module ecell_gol
  import confetti_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter logic [23:0] LIVE_RGB = 24'hFFFFFF,
  parameter logic [23:0] DEAD_RGB = 24'h000000,
  parameter int unsigned AW       = $clog2(N*N)
) (
  input  logic           clk,
  input  logic           rst_n,
  // global synchronisation level from the ERouting FPGA
  input  logic           sync_in,
  // initial pattern
  input  logic           load,
  input  logic [N*N-1:0] load_state,
  // links to / from the ERouting FPGA below
  output link_t          link_up,
  input  link_t          link_down,
  // display square write port
  output logic           pix_we,
  output logic [AW-1:0]  pix_addr,
  output logic [23:0]    pix_rgb,
  // status
  output logic [N*N-1:0] state,
  output logic           idle,
  output logic [15:0]    generation,
  output logic           overrun
);
  initial begin
    assert (N + 2 <= WORD_W) else $error("ecell_gol: tile too large for the direction buses");
  end

  typedef enum logic [2:0] {
    S_IDLE, S_SEND_A, S_WAIT_A, S_SEND_B, S_WAIT_B, S_STEP, S_DRAW
  } st_e;

  st_e                         st;
  logic [1:0]                  sync_meta;
  logic                        sync_q;
  logic                        sync_evt;
  logic [1:0]                  load_meta;
  logic                        load_q;
  logic                        load_evt;
  logic                        comm_start, comm_ready, comm_done;
  logic [NDIR-1:0][WORD_W-1:0] out_word, in_word;
  logic [N-1:0]                halo_w, halo_e;
  logic [N+1:0]                halo_n, halo_s;
  logic [AW-1:0]               pix;
  logic                        step;

  assign sync_evt = sync_meta[1] ^ sync_q;
  assign load_evt = load_meta[1] && !load_q;
  assign idle     = (st == S_IDLE);
  assign step     = (st == S_STEP);

  gol_array #(.N(N)) u_array (
    .clk, .rst_n,
    .step,
    .load       (load_evt && idle),
    .load_state,
    .halo_n, .halo_s, .halo_w, .halo_e,
    .state
  );

  ecell_comm u_comm (
    .clk, .rst_n,
    .start    (comm_start),
    .ready    (comm_ready),
    .out_word,
    .done     (comm_done),
    .in_word,
    .link_up,
    .link_down
  );

  // Outgoing direction words for the current exchange.
  always_comb begin
    out_word   = '0;
    comm_start = 1'b0;
    if (st == S_SEND_A) begin
      for (int r = 0; r < N; r++) begin
        out_word[DIR_W][r] = state[r*N];
        out_word[DIR_E][r] = state[r*N + N - 1];
      end
      comm_start = comm_ready;
    end else if (st == S_SEND_B) begin
      out_word[DIR_N][0]   = halo_w[0];
      out_word[DIR_N][N+1] = halo_e[0];
      out_word[DIR_S][0]   = halo_w[N-1];
      out_word[DIR_S][N+1] = halo_e[N-1];
      for (int c = 0; c < N; c++) begin
        out_word[DIR_N][c+1] = state[c];
        out_word[DIR_S][c+1] = state[(N-1)*N + c];
      end
      comm_start = comm_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      sync_meta  <= '0;
      sync_q     <= 1'b0;
      load_meta  <= '0;
      load_q     <= 1'b0;
      halo_w     <= '0;
      halo_e     <= '0;
      halo_n     <= '0;
      halo_s     <= '0;
      pix        <= '0;
      generation <= '0;
      overrun    <= 1'b0;
    end else begin
      sync_meta <= {sync_meta[0], sync_in};
      sync_q    <= sync_meta[1];
      load_meta <= {load_meta[0], load};
      load_q    <= load_meta[1];
      if (sync_evt && st != S_IDLE) overrun <= 1'b1;
      unique case (st)
        S_IDLE: begin
          pix <= '0;
          if (load_evt)      st <= S_DRAW;
          else if (sync_evt) st <= S_SEND_A;
        end
        S_SEND_A: if (comm_ready) st <= S_WAIT_A;
        S_WAIT_A: if (comm_done) begin
          halo_w <= in_word[DIR_W][N-1:0];
          halo_e <= in_word[DIR_E][N-1:0];
          st     <= S_SEND_B;
        end
        S_SEND_B: if (comm_ready) st <= S_WAIT_B;
        S_WAIT_B: if (comm_done) begin
          halo_n <= in_word[DIR_N][N+1:0];
          halo_s <= in_word[DIR_S][N+1:0];
          st     <= S_STEP;
        end
        S_STEP: begin
          generation <= generation + 16'd1;
          st         <= S_DRAW;
        end
        S_DRAW: begin
          pix <= pix + 1'b1;
          if (pix == AW'(N*N - 1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign pix_we   = (st == S_DRAW);
  assign pix_addr = pix;
  assign pix_rgb  = state[pix] ? LIVE_RGB : DEAD_RGB;

endmodule
