// alu: arithmetic and logic unit of the RISC processor.
//
// Combinational. Operand a arrives on ALU data bus A (register rs), operand b on ALU
// data bus B (register rt or the zero-extended immediate). It performs ADD, SUB, AND,
// OR, XOR and set-less-than, and produces the four status flags: Z (result is zero),
// C (carry out of ADD), B (borrow out of SUB) and P (result has an odd number of ones).
// The operation set and the flags follow the processor description; that set-less-than
// compares signed values, and that logic operations clear C and B, are this design's
// choices.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  alu_op_e           op,
  output logic [DATA_W-1:0] y,
  output flags_t            flags
);

  logic [DATA_W:0] sum, diff;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
    flags.c = 1'b0;
    flags.b = 1'b0;
    unique case (op)
      ALU_ADD: begin y = sum[DATA_W-1:0];  flags.c = sum[DATA_W];  end
      ALU_SUB: begin y = diff[DATA_W-1:0]; flags.b = diff[DATA_W]; end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SLT: y = DATA_W'($signed(a) < $signed(b));
      default: y = '0;
    endcase
    flags.z = (y == '0);
    flags.p = ^y;
  end

endmodule
