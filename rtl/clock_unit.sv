// clock_unit: clock generation and low-power unit (LPU) of the control unit.
//
// The board clock clk_src is divided by CLK_DIV (even, default 2: 50 MHz board clock
// to the 25 MHz core clock) into clk_core, which clocks the whole core; the divider
// runs freely, also during reset. The active-low reset rst_n is asserted
// asynchronously (and at every core clock edge while it is low) and released
// synchronously to clk_core through two flops (rst, active high). baud_tick is a one-cycle enable in the core
// clock domain at OVERSAMPLE x BAUD, from a counter of round(CORE_HZ /
// (BAUD*OVERSAMPLE)) cycles (27 for 25 MHz, 115200 baud, 8x: 0.5 % fast).
// LPU: the register set and the data memory are clocked only when they are loaded.
// rf_clk_en / dm_clk_en are those clock enables, raised only in a cycle that writes
// the block; the FPGA maps them to clock-enable pins or a clock buffer with enable.
// The core frequency, the baud rate and the gating of exactly these two blocks follow
// the processor description; the enable form of the gating, the divider and the
// oversampling are this design's choices. dm_clk_en also covers host preloading.
module clock_unit #(
  parameter int unsigned CLK_DIV    = 2,
  parameter int unsigned CORE_HZ    = 25_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned OVERSAMPLE = 8
) (
  input  logic clk_src,
  input  logic rst_n,
  output logic clk_core,
  output logic rst,
  output logic baud_tick,
  input  logic rf_wr,
  input  logic dm_wr,
  output logic rf_clk_en,
  output logic dm_clk_en
);

  localparam int unsigned HALF   = CLK_DIV / 2;
  localparam int unsigned DW     = (HALF > 1) ? $clog2(HALF) : 1;
  localparam int unsigned BAUD_DIV = (CORE_HZ + (BAUD * OVERSAMPLE) / 2) / (BAUD * OVERSAMPLE);
  localparam int unsigned BW     = $clog2(BAUD_DIV) + 1;

  // Clock divider: clk_core toggles every HALF source cycles.
  logic [DW-1:0] div_cnt;
  always_ff @(posedge clk_src) begin
    if (div_cnt == DW'(HALF - 1)) begin
      div_cnt  <= '0;
      clk_core <= ~clk_core;
    end else begin
      div_cnt  <= div_cnt + 1'b1;
    end
  end

  // Reset synchroniser.
  logic rst_m;
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) begin
      rst_m <= 1'b1;
      rst   <= 1'b1;
    end else begin
      rst_m <= 1'b0;
      rst   <= rst_m;
    end
  end

  // Baud-rate tick.
  logic [BW-1:0] baud_cnt;
  always_ff @(posedge clk_core) begin
    if (rst) begin
      baud_cnt  <= '0;
      baud_tick <= 1'b0;
    end else if (baud_cnt == BW'(BAUD_DIV - 1)) begin
      baud_cnt  <= '0;
      baud_tick <= 1'b1;
    end else begin
      baud_cnt  <= baud_cnt + 1'b1;
      baud_tick <= 1'b0;
    end
  end

  // Low-power unit: clock enables of the register set and data memory.
  assign rf_clk_en = rf_wr;
  assign dm_clk_en = dm_wr;

endmodule
