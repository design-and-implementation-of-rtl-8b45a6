// accumulator: the processor's accumulator register and its own operations.
//
// Every ALU result, every value taken from the input port and every byte read from
// the receive buffer is loaded here (load=1, din). The accumulator drives the output
// port and the transmit buffer. It also operates on itself: increment, decrement,
// complement, rotate right and rotate left (op). `result` is op applied to the
// current value, combinationally, so the instruction that requests it can also write
// it to a register in the same cycle; acc takes it at the next rising edge. An op has
// priority over a load. z/p are the zero and odd-parity flags of `result`. Rotates do
// not go through the carry flag (this design's choice).
module accumulator
  import risc_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [DATA_W-1:0] din,
  input  acc_op_e           op,
  output logic [DATA_W-1:0] acc,
  output logic [DATA_W-1:0] result,
  output logic              z,
  output logic              p
);

  always_comb begin
    unique case (op)
      ACC_INC: result = acc + 1'b1;
      ACC_DEC: result = acc - 1'b1;
      ACC_CPL: result = ~acc;
      ACC_ROR: result = {acc[0], acc[DATA_W-1:1]};
      ACC_ROL: result = {acc[DATA_W-2:0], acc[DATA_W-1]};
      default: result = acc;
    endcase
    z = (result == '0);
    p = ^result;
  end

  always_ff @(posedge clk) begin
    if (rst)                 acc <= '0;
    else if (op != ACC_NONE) acc <= result;
    else if (load)           acc <= din;
  end

endmodule
