// decoder: instruction decoder of the control unit.
//
// Combinational. Whenever IRX holds a valid instruction the decoder produces the
// control word (risc_pkg::ctl_t) for the execute stage; for an invalid slot (a
// pipeline bubble) and for the all-zero word (the no-operation) every strobe is low.
//   R-type  add sub and or xor slt : rd <= rs op rt, flags and accumulator updated
//           inc dec cpl ror rol     : accumulator operates on itself, rd <= result
//           jr                      : jump to register
//           sys (funct 14)          : rt selects in/out/send/recv/status/INTCON
//                                     write/CLRTMRF/return from interrupt
//   slti addi : rt <= rs op zero-extended imm7, flags and accumulator updated
//   lw sw     : address rs + imm7;  beq : compare rs and rt with SUB
//   j jal     : jump; jal writes the return address to R7
// The formats, opcodes and funct codes 0-4 and 8 follow the processor's instruction
// table; the other funct codes, the system group and the zero-extension of
// immediates (required for its example program to run as its trace shows) are this
// design's reading.
module decoder
  import risc_pkg::*;
(
  input  logic [15:0] irx,
  input  logic        valid,
  output ctl_t        ctl
);

  opcode_e op;
  funct_e  fn;
  sys_e    sys;

  assign op  = opcode_e'(irx[15:13]);
  assign fn  = funct_e'(irx[3:0]);
  assign sys = sys_e'(irx[9:7]);

  always_comb begin
    ctl = '0;
    ctl.wb_sel = WB_ALU;
    ctl.alu_op = ALU_ADD;
    ctl.acc_op = ACC_NONE;
    ctl.jump   = JMP_NONE;
    if (valid && irx != NOP) begin
      unique case (op)
        OP_RTYPE: begin
          ctl.rf_wa = irx[6:4];
          unique case (fn)
            FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR, FN_SLT: begin
              ctl.rf_we    = 1'b1;
              ctl.flags_we = 1'b1;
              ctl.acc_load = 1'b1;
              unique case (fn)
                FN_SUB:  ctl.alu_op = ALU_SUB;
                FN_AND:  ctl.alu_op = ALU_AND;
                FN_OR:   ctl.alu_op = ALU_OR;
                FN_XOR:  ctl.alu_op = ALU_XOR;
                FN_SLT:  ctl.alu_op = ALU_SLT;
                default: ctl.alu_op = ALU_ADD;
              endcase
            end
            FN_INC, FN_DEC, FN_CPL, FN_ROR, FN_ROL: begin
              ctl.rf_we  = 1'b1;
              ctl.wb_sel = WB_ACC;
              unique case (fn)
                FN_INC:  ctl.acc_op = ACC_INC;
                FN_DEC:  ctl.acc_op = ACC_DEC;
                FN_CPL:  ctl.acc_op = ACC_CPL;
                FN_ROR:  ctl.acc_op = ACC_ROR;
                default: ctl.acc_op = ACC_ROL;
              endcase
            end
            FN_JR: ctl.jump = JMP_JR;
            FN_SYS: begin
              unique case (sys)
                SYS_IN: begin
                  ctl.rf_we = 1'b1; ctl.wb_sel = WB_INPORT; ctl.acc_load = 1'b1;
                end
                SYS_OUT:  ctl.out_we   = 1'b1;
                SYS_SEND: ctl.tx_start = 1'b1;
                SYS_RECV: begin
                  ctl.rf_we = 1'b1; ctl.wb_sel = WB_RBUFF; ctl.acc_load = 1'b1;
                  ctl.rx_ack = 1'b1;
                end
                SYS_STAT: begin
                  ctl.rf_we = 1'b1; ctl.wb_sel = WB_STATUS;
                end
                SYS_WINTCON: ctl.intcon_we = 1'b1;
                SYS_CLRTMRF: ctl.clr_tmrf  = 1'b1;
                default:     ctl.jump      = JMP_RETI;
              endcase
            end
            default: ;
          endcase
        end
        OP_SLTI, OP_ADDI: begin
          ctl.rf_we     = 1'b1;
          ctl.rf_wa     = irx[9:7];
          ctl.alu_b_imm = 1'b1;
          ctl.flags_we  = 1'b1;
          ctl.acc_load  = 1'b1;
          ctl.alu_op    = (op == OP_SLTI) ? ALU_SLT : ALU_ADD;
        end
        OP_LW: begin
          ctl.rf_we     = 1'b1;
          ctl.rf_wa     = irx[9:7];
          ctl.wb_sel    = WB_MEM;
          ctl.alu_b_imm = 1'b1;
        end
        OP_SW: begin
          ctl.dm_we     = 1'b1;
          ctl.alu_b_imm = 1'b1;
        end
        OP_BEQ: begin
          ctl.alu_op = ALU_SUB;
          ctl.jump   = JMP_BEQ;
        end
        OP_J: ctl.jump = JMP_J;
        default: begin  // OP_JAL
          ctl.jump   = JMP_JAL;
          ctl.rf_we  = 1'b1;
          ctl.rf_wa  = 3'd7;
          ctl.wb_sel = WB_LINK;
        end
      endcase
    end
  end

endmodule
