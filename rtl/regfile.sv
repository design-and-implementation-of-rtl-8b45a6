// regfile: register set R0..R7 of the RISC processor.
//
// Two asynchronous read ports feed ALU data buses A (ra) and B (rb); one write port
// takes the system data bus at the rising clock edge when the low-power unit's clock
// enable clk_en and the write strobe we are both high. clk_en stands for the gated
// clock of the register set: the register set is clocked only when it is loaded.
// R0 always reads as zero (the MIPS-style convention the instruction set relies on);
// all registers clear on reset. A value written in one cycle is readable in the next.
module regfile #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned NREG   = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clk_en,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] wa,
  input  logic [DATA_W-1:0]       wd,
  input  logic [$clog2(NREG)-1:0] ra,
  input  logic [$clog2(NREG)-1:0] rb,
  output logic [DATA_W-1:0]       da,
  output logic [DATA_W-1:0]       db
);

  logic [DATA_W-1:0] r [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) r[i] <= '0;
    end else if (clk_en && we && wa != '0) begin
      r[wa] <= wd;
    end
  end

  assign da = (ra == '0) ? '0 : r[ra];
  assign db = (rb == '0) ? '0 : r[rb];

endmodule
