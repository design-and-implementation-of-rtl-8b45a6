// risc_pkg: instruction encoding, control-signal types and shared constants of the
// pipelined RISC processor.
//
// Instructions are 16 bits wide, in three MIPS-like formats:
//   R: op[15:13] rs[12:10] rt[9:7] rd[6:4] funct[3:0]
//   I: op[15:13] rs[12:10] rt[9:7] imm[6:0]        (immediate zero-extended)
//   J: op[15:13] target[12:0]
// The opcodes and the funct codes 0..4 and 8 follow the processor's published
// instruction table (add, sub, and, or, slt, jr, lw, sw, beq, addi, j, jal, plus slti
// used in its example program). The remaining funct codes (xor, the accumulator
// operations and the system group for I/O, serial and interrupt control) are this
// design's own assignment.
package risc_pkg;

  typedef enum logic [2:0] {
    OP_RTYPE = 3'd0,
    OP_SLTI  = 3'd1,
    OP_J     = 3'd2,
    OP_JAL   = 3'd3,
    OP_LW    = 3'd4,
    OP_SW    = 3'd5,
    OP_BEQ   = 3'd6,
    OP_ADDI  = 3'd7
  } opcode_e;

  typedef enum logic [3:0] {
    FN_ADD = 4'd0,
    FN_SUB = 4'd1,
    FN_AND = 4'd2,
    FN_OR  = 4'd3,
    FN_SLT = 4'd4,
    FN_XOR = 4'd5,
    FN_INC = 4'd6,
    FN_DEC = 4'd7,
    FN_JR  = 4'd8,
    FN_CPL = 4'd9,
    FN_ROR = 4'd10,
    FN_ROL = 4'd11,
    FN_SYS = 4'd14
  } funct_e;

  // System group (funct 14), selected by the rt field.
  typedef enum logic [2:0] {
    SYS_IN      = 3'd0,  // ACC, rd <= input port
    SYS_OUT     = 3'd1,  // output port <= ACC
    SYS_SEND    = 3'd2,  // TBUFF <= ACC, start transmission
    SYS_RECV    = 3'd3,  // ACC, rd <= RBUFF, clear receive-ready
    SYS_STAT    = 3'd4,  // rd <= status word
    SYS_WINTCON = 3'd5,  // INTCON <= rs[2:0]
    SYS_CLRTMRF = 3'd6,  // clear timer flag TMF0
    SYS_RETI    = 3'd7   // return from interrupt service routine
  } sys_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT
  } alu_op_e;

  typedef enum logic [2:0] {
    ACC_NONE, ACC_INC, ACC_DEC, ACC_CPL, ACC_ROR, ACC_ROL
  } acc_op_e;

  typedef enum logic [2:0] {
    JMP_NONE, JMP_BEQ, JMP_J, JMP_JAL, JMP_JR, JMP_RETI
  } jump_e;

  // Source of the value written back over the system data bus.
  typedef enum logic [2:0] {
    WB_ALU, WB_MEM, WB_ACC, WB_INPORT, WB_RBUFF, WB_STATUS, WB_LINK
  } wb_sel_e;

  // Flag register: zero, carry, borrow, parity (odd number of ones).
  typedef struct packed {
    logic z;
    logic c;
    logic b;
    logic p;
  } flags_t;

  typedef struct packed {
    logic     rf_we;      // write register rf_wa
    logic [2:0] rf_wa;
    wb_sel_e  wb_sel;
    alu_op_e  alu_op;
    logic     alu_b_imm;  // ALU bus B takes the zero-extended immediate
    logic     flags_we;   // ALU updates Z C B P
    logic     acc_load;   // accumulator takes the write-back value
    acc_op_e  acc_op;     // accumulator operates on itself
    logic     dm_we;      // store
    jump_e    jump;
    logic     out_we;     // output port <= ACC
    logic     tx_start;   // TBUFF <= ACC
    logic     rx_ack;     // RBUFF has been read
    logic     intcon_we;
    logic     clr_tmrf;
  } ctl_t;

  localparam logic [15:0] NOP = 16'h0000;  // add $0,$0,$0


endpackage
