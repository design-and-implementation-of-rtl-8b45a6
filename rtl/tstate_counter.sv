// tstate_counter: pipeline sequencer of the control unit (TF1 / TX1 / TX2).
//
// The processor overlaps a fetch cycle (TF1: IR <= IM[PC]) with the execute cycle of
// the previous instruction (TX1: the instruction in IRX executes). When the executing
// instruction redirects the flow (taken beq, j, jal, jr, return from interrupt) or an
// interrupt is accepted, the target goes to PCR at the end of TX1 and a second
// execute cycle, TX2, follows: the execute stage holds a bubble, the instruction that
// had been fetched is discarded and the fetch reads the target from PCR. A redirect
// therefore costs two cycles in which nothing executes; straight-line code executes
// one instruction per cycle.
// An interrupt request (irq) is accepted in a TX1 cycle without a redirect, once IR
// holds a fetched instruction (ir_valid); that instruction is the one re-executed
// after the service routine.
// Outputs: tx2 (state), advance (normal fetch: IR loads, PC increments), irx_load (IR
// moves to IRX; otherwise IRX receives a bubble), irq_take, ir_valid.
// The TF1/TX1/TX2 cycles and the place of interrupt and jump handling follow the
// processor description; the two-cycle penalty and the acceptance rule are this
// design's choices.
module tstate_counter (
  input  logic clk,
  input  logic rst,
  input  logic redirect,
  input  logic irq,
  output logic tx2,
  output logic advance,
  output logic irx_load,
  output logic irq_take,
  output logic ir_valid
);

  assign irq_take = ~tx2 & ~redirect & irq & ir_valid;
  assign irx_load = ~tx2 & ~redirect & ~irq_take;
  assign advance  = irx_load;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx2      <= 1'b0;
      ir_valid <= 1'b0;
    end else begin
      tx2      <= ~tx2 & (redirect | irq_take);
      ir_valid <= tx2 | irx_load;
    end
  end

  // TX2 lasts exactly one cycle, and a redirect is never accepted together with an
  // interrupt.
  a_tx2_one_cycle: assert property (@(posedge clk) disable iff (rst) tx2 |=> !tx2);
  a_no_double_redirect: assert property (@(posedge clk) disable iff (rst) !(irq_take && redirect));

endmodule
