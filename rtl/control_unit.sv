// control_unit: instruction registers, sequencing and decoding.
//
// IR captures the fetched instruction (fetch_data, read at fetch_addr) at the end of
// each fetch cycle together with its address; at the same edge the previous content
// of IR moves to IRX, the execute register, so one instruction executes while the
// next is fetched. The tstate counter decides between that normal flow and the TX2
// cycle after a redirect or an interrupt entry, in which IRX holds a bubble. The
// decoder turns IRX into the control word. A redirect is raised for j, jal, jr and
// return from interrupt, and for beq when its operands are equal (eq, the ALU zero
// output of rs - rt).
// The structure (IR, IRX, tstate counter, decoder) follows the processor
// description. The low-power unit of the control unit is in clock_unit.
module control_unit
  import risc_pkg::*;
#(
  parameter int unsigned IM_AW = 18
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [15:0]      fetch_data,
  input  logic [IM_AW-1:0] fetch_addr,
  input  logic             eq,
  input  logic             irq,
  output ctl_t             ctl,
  output logic [15:0]      ir,
  output logic [IM_AW-1:0] ir_pc,
  output logic [15:0]      irx,
  output logic [IM_AW-1:0] irx_pc,
  output logic             irx_valid,
  output logic             redirect,
  output logic             irq_take,
  output logic             advance,
  output logic             tx2
);

  logic irx_load, ir_valid;

  tstate_counter u_tstate (
    .clk, .rst, .redirect, .irq, .tx2, .advance, .irx_load, .irq_take, .ir_valid
  );

  decoder u_decoder (.irx, .valid(irx_valid), .ctl);

  assign redirect = (ctl.jump != JMP_NONE) && ((ctl.jump != JMP_BEQ) || eq);

  always_ff @(posedge clk) begin
    if (rst) begin
      ir        <= NOP;
      ir_pc     <= '0;
      irx       <= NOP;
      irx_pc    <= '0;
      irx_valid <= 1'b0;
    end else begin
      if (advance || tx2) begin
        ir    <= fetch_data;
        ir_pc <= fetch_addr;
      end
      if (irx_load) begin
        irx       <= ir;
        irx_pc    <= ir_pc;
        irx_valid <= ir_valid;
      end else begin
        irx       <= NOP;
        irx_valid <= 1'b0;
      end
    end
  end

endmodule
