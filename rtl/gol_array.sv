// gol_array: an N x N block of Conway's Game of Life cells.
//
// Cell (r, c) is state[r*N + c]; row 0 is the north edge, column 0 the
// west edge. Each cell counts its eight neighbours; those outside the block
// come from the halo inputs, which hold the facing edge cells of the
// neighbouring ECells:
//   halo_w[r], halo_e[r]   : column -1 and column N, rows 0..N-1
//   halo_n[k], halo_s[k]   : row -1 and row N, columns k-1 for k = 0..N+1
//                            (bit 0 is the north-west / south-west corner)
// On 'step' every cell takes its next state at once (birth on exactly 3
// live neighbours, survival on 2 or 3). On 'load' the state is replaced by
// load_state; load wins over step. The update is combinational over the
// whole block and registered in one clock.
//
// The CONFETTI platform description gives the 8 x 8 block per ECell (one cell per display
// pixel) and a 12 x 12 variant; the rule is the standard Game of Life; the
// halo layout is this design's own.
module gol_array #(
  parameter int unsigned N = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             load,
  input  logic [N*N-1:0]   load_state,
  input  logic [N+1:0]     halo_n,
  input  logic [N+1:0]     halo_s,
  input  logic [N-1:0]     halo_w,
  input  logic [N-1:0]     halo_e,
  output logic [N*N-1:0]   state
);
  // Padded (N+2) x (N+2) view: padded row pr = r+1, column pc = c+1.
  logic [N+1:0][N+1:0] pad;   // pad[pr][pc]
  logic [N*N-1:0]      next_state;

  always_comb begin
    pad        = '0;
    pad[0]     = halo_n;
    pad[N+1]   = halo_s;
    for (int r = 0; r < N; r++) begin
      pad[r+1][0]   = halo_w[r];
      pad[r+1][N+1] = halo_e[r];
      for (int c = 0; c < N; c++) pad[r+1][c+1] = state[r*N + c];
    end
  end

  always_comb begin
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        logic [3:0] cnt;
        cnt = 4'(pad[r][c]) + 4'(pad[r][c+1]) + 4'(pad[r][c+2])
            + 4'(pad[r+1][c])                 + 4'(pad[r+1][c+2])
            + 4'(pad[r+2][c]) + 4'(pad[r+2][c+1]) + 4'(pad[r+2][c+2]);
        next_state[r*N + c] = (cnt == 4'd3) || (cnt == 4'd2 && state[r*N + c]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (load)  state <= load_state;
    else if (step)  state <= next_state;
  end

endmodule
