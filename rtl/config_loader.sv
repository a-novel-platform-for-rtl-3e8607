// config_loader: loads one of the configurations stored in the ERouting
// FPGA's Flash memory into the ECell FPGA above it.
//
// The 16 Mbit Flash is split into NUM_SLOTS equal slots of SLOT_BYTES
// bytes; slot s starts at byte address s*SLOT_BYTES. A 'start' pulse
// (while not busy) loads slot 'slot':
//   1. PROG: prog_b is held low for PROG_CYCLES cycles, clearing the ECell
//      FPGA, then released; the loader waits for init_b to go high.
//   2. For each of the CFG_BYTES bytes: the Flash is read (address on
//      flash_addr, flash_oe_n low, data sampled FLASH_WAIT cycles later),
//      then the byte is shifted out on din, most significant bit first,
//      one bit per cclk period (cclk low for one cycle, high for one; the
//      FPGA samples din on the rising edge).
//   3. Clocking continues until 'done' goes high (ok) or DONE_CLKS more
//      cclk periods pass without it (error).
// busy is high from start to the end; ok / error hold the last outcome.
//
// The CONFETTI platform description gives that each ERouting FPGA reaches a 16 Mbit Flash that
// typically holds up to sixteen ECell configurations and directs the
// configuration to its ECell. The Flash read timing, the slave-serial
// configuration pins and CFG_BYTES (the size of an XC3S200 configuration
// bitstream, 1,047,616 bits) come from the parts' usual behaviour, not
// from the platform description.
module config_loader #(
  parameter int unsigned FLASH_AW    = 21,       // 2 Mbyte = 16 Mbit, byte wide
  parameter int unsigned NUM_SLOTS   = 16,
  parameter int unsigned SLOT_BYTES  = 131072,   // (2**FLASH_AW) / NUM_SLOTS
  parameter int unsigned CFG_BYTES   = 130952,
  parameter int unsigned FLASH_WAIT  = 6,        // cycles from address to data
  parameter int unsigned PROG_CYCLES = 32,
  parameter int unsigned DONE_CLKS   = 64,
  parameter int unsigned SW          = $clog2(NUM_SLOTS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [SW-1:0]       slot,
  output logic                busy,
  output logic                ok,
  output logic                error,
  // Flash read port
  output logic [FLASH_AW-1:0] flash_addr,
  output logic                flash_oe_n,
  input  logic [7:0]          flash_data,
  // ECell FPGA configuration pins
  output logic                prog_b,
  output logic                cclk,
  output logic                din,
  input  logic                init_b,
  input  logic                done
);
  initial begin
    assert (NUM_SLOTS * SLOT_BYTES <= 2**FLASH_AW) else $error("config_loader: slots exceed the Flash");
    assert (CFG_BYTES <= SLOT_BYTES) else $error("config_loader: configuration exceeds a slot");
  end

  typedef enum logic [2:0] {
    C_IDLE, C_PROG, C_INIT, C_READ, C_SHIFT, C_FLUSH
  } cst_e;

  localparam int unsigned BW = $clog2(CFG_BYTES + 1);
  localparam int unsigned WW = $clog2(FLASH_WAIT + PROG_CYCLES + DONE_CLKS + 2);

  cst_e                st;
  logic [FLASH_AW-1:0] base;
  logic [BW-1:0]       byte_idx;
  logic [WW-1:0]       wait_cnt;
  logic [7:0]          shreg;
  logic [2:0]          bit_idx;
  logic                phase;     // 0: cclk low half, 1: cclk high half

  assign busy       = (st != C_IDLE);
  assign flash_addr = base + FLASH_AW'(byte_idx);
  assign flash_oe_n = (st != C_READ);
  assign prog_b     = (st != C_PROG);
  assign cclk       = (st == C_SHIFT || st == C_FLUSH) && phase;
  assign din        = (st == C_SHIFT) ? shreg[7] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= C_IDLE;
      base     <= '0;
      byte_idx <= '0;
      wait_cnt <= '0;
      shreg    <= '0;
      bit_idx  <= '0;
      phase    <= 1'b0;
      ok       <= 1'b0;
      error    <= 1'b0;
    end else begin
      unique case (st)
        C_IDLE: if (start) begin
          base     <= FLASH_AW'(slot) * FLASH_AW'(SLOT_BYTES);
          byte_idx <= '0;
          wait_cnt <= '0;
          ok       <= 1'b0;
          error    <= 1'b0;
          st       <= C_PROG;
        end
        C_PROG: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == WW'(PROG_CYCLES - 1)) begin
            wait_cnt <= '0;
            st       <= C_INIT;
          end
        end
        C_INIT: if (init_b) st <= C_READ;
        C_READ: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == WW'(FLASH_WAIT - 1)) begin
            wait_cnt <= '0;
            shreg    <= flash_data;
            bit_idx  <= '0;
            phase    <= 1'b0;
            st       <= C_SHIFT;
          end
        end
        C_SHIFT: begin
          phase <= !phase;
          if (phase) begin
            shreg   <= shreg << 1;
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) begin
              byte_idx <= byte_idx + 1'b1;
              if (byte_idx == BW'(CFG_BYTES - 1)) begin
                wait_cnt <= '0;
                st       <= C_FLUSH;
              end else begin
                st <= C_READ;
              end
            end
          end
        end
        C_FLUSH: begin
          phase <= !phase;
          if (done) begin
            ok <= 1'b1;
            st <= C_IDLE;
          end else if (phase) begin
            wait_cnt <= wait_cnt + 1'b1;
            if (wait_cnt == WW'(DONE_CLKS - 1)) begin
              error <= 1'b1;
              st    <= C_IDLE;
            end
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
