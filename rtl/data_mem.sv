// data_mem: data memory of the Harvard RISC processor, 4096 words of 8 bits.
//
// Addressed by the 12-bit DM address bus; read asynchronously onto the system data
// bus so a load completes in its execute cycle; written at the rising edge when the
// low-power unit's enable clk_en (the memory's gated clock) and we are high. The
// size follows the processor description; the asynchronous read is this design's
// choice. Contents are not reset.
module data_mem #(
  parameter int unsigned AW = 12,
  parameter int unsigned W  = 8
) (
  input  logic          clk,
  input  logic          clk_en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (clk_en && we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
