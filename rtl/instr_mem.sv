// instr_mem: instruction memory of the Harvard RISC processor, 262,144 words of 16
// bits (18-bit address).
//
// The fetch stage reads it asynchronously at raddr (the IM address bus) and captures
// the word in IR at the next rising edge. A separate write port loads the program
// while the core is held in reset (this design's choice; the description only says
// the program is stored in instruction memory). Contents are not reset.
module instr_mem #(
  parameter int unsigned AW = 18,
  parameter int unsigned W  = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
