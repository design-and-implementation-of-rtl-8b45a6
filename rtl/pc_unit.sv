// pc_unit: program counter unit with PC, PCR, PCS and STACKPC.
//
// PC (18 bits) addresses the instruction memory. In a normal fetch cycle (advance)
// fetch_addr = PC and PC increments by one. A taken branch, jump or return in the
// execute stage (redirect) writes its target into PCR; so does an accepted interrupt
// (irq_take), with its vector, while STACKPC saves ret_pc, the address of the
// instruction that was fetched but not executed. In the following cycle, TX2
// (from_pcr), the fetch reads at PCR and PC becomes PCR + 1.
// Targets, from the executing instruction at irx_pc:
//   beq  {irx_pc[17:7], imm7} + 1    (the imm field names the word before the target)
//   j    {irx_pc[17:13], target13}
//   jal  as j; PCS <= irx_pc + 1, and `link` (the same value) goes to R7
//   jr   {PCS[17:DATA_W], R[rs]}     (R[rs] supplies the low DATA_W bits)
//   reti STACKPC
// The registers and their roles follow the processor description. The beq "+1" rule
// is read from the published program and its trace (field 1 returns to address 2);
// the jr/PCS combination is this design's choice, because an 8-bit register cannot
// hold an 18-bit return address.
module pc_unit
  import risc_pkg::*;
#(
  parameter int unsigned IM_AW  = 18,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              advance,
  input  logic              from_pcr,
  input  logic              redirect,
  input  jump_e             jump,
  input  logic [IM_AW-1:0]  irx_pc,
  input  logic [6:0]        imm7,
  input  logic [12:0]       target13,
  input  logic [DATA_W-1:0] reg_rs,
  input  logic              irq_take,
  input  logic [IM_AW-1:0]  vector,
  input  logic [IM_AW-1:0]  ret_pc,
  output logic [IM_AW-1:0]  fetch_addr,
  output logic [IM_AW-1:0]  pc,
  output logic [IM_AW-1:0]  pcr,
  output logic [IM_AW-1:0]  pcs,
  output logic [IM_AW-1:0]  stackpc,
  output logic [IM_AW-1:0]  link
);

  localparam logic [IM_AW-1:0] LOW_MASK =
      (DATA_W >= IM_AW) ? '1 : IM_AW'((IM_AW+1)'(1) << DATA_W) - 1'b1;

  logic [IM_AW-1:0] target;

  assign link       = irx_pc + 1'b1;
  assign fetch_addr = from_pcr ? pcr : pc;

  always_comb begin
    unique case (jump)
      JMP_BEQ:         target = {irx_pc[IM_AW-1:7], imm7} + 1'b1;
      JMP_J, JMP_JAL:  target = {irx_pc[IM_AW-1:13], target13};
      JMP_JR:          target = (pcs & ~LOW_MASK) | (IM_AW'(reg_rs) & LOW_MASK);
      JMP_RETI:        target = stackpc;
      default:         target = pc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      pcr     <= '0;
      pcs     <= '0;
      stackpc <= '0;
    end else begin
      if (from_pcr)     pc <= pcr + 1'b1;
      else if (advance) pc <= pc + 1'b1;
      if (irq_take) begin
        pcr     <= vector;
        stackpc <= ret_pc;
      end else if (redirect) begin
        pcr <= target;
        if (jump == JMP_JAL) pcs <= link;
      end
    end
  end

endmodule
