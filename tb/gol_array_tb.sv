// gol_array_tb: self-checking test of gol_array at N = 8 and N = 12.
// Loads random patterns, drives random halos and compares every step with
// a Game of Life reference computed in the testbench on an (N+2) x (N+2)
// grid built from the state and the halos. Also checks that the state
// holds without 'step' and that 'load' wins over 'step'.
module gol_array_tb;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Reference next state of an n x n block (n <= 12) with its halo.
  function automatic logic [143:0] ref_next(input int n, input logic [143:0] st,
                                            input logic [13:0] hn, input logic [13:0] hs,
                                            input logic [11:0] hw, input logic [11:0] he);
    logic g[14][14];
    logic [143:0] nx;
    for (int r = 0; r < 14; r++) for (int c = 0; c < 14; c++) g[r][c] = 0;
    for (int k = 0; k < n + 2; k++) begin g[0][k] = hn[k]; g[n+1][k] = hs[k]; end
    for (int r = 0; r < n; r++) begin
      g[r+1][0] = hw[r]; g[r+1][n+1] = he[r];
      for (int c = 0; c < n; c++) g[r+1][c+1] = st[r*n + c];
    end
    nx = '0;
    for (int r = 1; r <= n; r++)
      for (int c = 1; c <= n; c++) begin
        int cnt = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (!(dr == 0 && dc == 0)) cnt += int'(g[r+dr][c+dc]);
        nx[(r-1)*n + (c-1)] = (cnt == 3) || (cnt == 2 && g[r][c]);
      end
    return nx;
  endfunction

  // ---- N = 8 ----
  logic step8, load8;
  logic [63:0] ls8, st8;
  logic [9:0] hn8, hs8;
  logic [7:0] hw8, he8;
  gol_array #(.N(8)) dut8 (.clk, .rst_n, .step(step8), .load(load8), .load_state(ls8),
                           .halo_n(hn8), .halo_s(hs8), .halo_w(hw8), .halo_e(he8), .state(st8));

  // ---- N = 12 ----
  logic step12, load12;
  logic [143:0] ls12, st12;
  logic [13:0] hn12, hs12;
  logic [11:0] hw12, he12;
  gol_array #(.N(12)) dut12 (.clk, .rst_n, .step(step12), .load(load12), .load_state(ls12),
                             .halo_n(hn12), .halo_s(hs12), .halo_w(hw12), .halo_e(he12), .state(st12));

  initial begin
    logic [143:0] e;
    step8 = 0; load8 = 0; ls8 = '0; hn8 = '0; hs8 = '0; hw8 = '0; he8 = '0;
    step12 = 0; load12 = 0; ls12 = '0; hn12 = '0; hs12 = '0; hw12 = '0; he12 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // blinker in the middle of the 8x8 block, empty halo: period 2
    @(negedge clk); load8 = 1; ls8 = '0; ls8[3*8+2] = 1; ls8[3*8+3] = 1; ls8[3*8+4] = 1;
    @(negedge clk); load8 = 0; step8 = 1;
    @(negedge clk); step8 = 0;
    chk(st8 == ((64'd1 << (2*8+3)) | (64'd1 << (3*8+3)) | (64'd1 << (4*8+3))), "blinker vertical phase");
    @(negedge clk); step8 = 1;
    @(negedge clk); step8 = 0;
    chk(st8 == ls8, "blinker back to horizontal");
    // random runs
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      if (it % 10 == 0) begin
        load8 = 1; ls8 = {$urandom, $urandom};
        load12 = 1; ls12 = {$urandom, $urandom, $urandom, $urandom, $urandom};
        step8 = (it % 20 == 0);   // load must win over step
        @(negedge clk);
        load8 = 0; load12 = 0; step8 = 0;
        chk(st8 == ls8, "load N=8");
        chk(st12 == ls12, "load N=12");
      end
      hn8 = 10'($urandom); hs8 = 10'($urandom); hw8 = 8'($urandom); he8 = 8'($urandom);
      hn12 = 14'($urandom); hs12 = 14'($urandom); hw12 = 12'($urandom); he12 = 12'($urandom);
      // no step: the state must hold
      begin
        logic [63:0] keep8;
        keep8 = st8;
        @(negedge clk);
        chk(st8 == keep8, "state holds without step");
      end
      e = ref_next(8, {80'd0, st8}, {4'd0, hn8}, {4'd0, hs8}, {4'd0, hw8}, {4'd0, he8});
      step8 = 1;
      begin
        logic [143:0] e12;
        e12 = ref_next(12, st12, hn12, hs12, hw12, he12);
        step12 = 1;
        @(negedge clk);
        step8 = 0; step12 = 0;
        chk(st8 == e[63:0], $sformatf("step N=8, iteration %0d", it));
        chk(st12 == e12, $sformatf("step N=12, iteration %0d", it));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
