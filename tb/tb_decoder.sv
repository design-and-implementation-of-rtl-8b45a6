// tb_decoder: self-checking test of the instruction decoder.
// Decodes the instruction words of the published example program (lw 8180, slti
// 2CE4, beq C407/C001, add 0E40, addi ED81, add 0990) and one word of every other
// instruction, and compares the control word with the expected fields. An invalid
// slot and the all-zero word must produce no strobes.
module tb_decoder;
  import risc_pkg::*;
  logic [15:0] irx;
  logic valid;
  ctl_t ctl;
  int checks = 0, failures = 0;

  decoder dut (.irx, .valid, .ctl);

  function automatic logic [15:0] rtype(int rs, int rt, int rd, int fn);
    return {3'd0, 3'(rs), 3'(rt), 3'(rd), 4'(fn)};
  endfunction

  task automatic expect_ctl(input logic [15:0] w, input logic v, input ctl_t e, input string name);
    irx = w; valid = v; #1; checks++;
    if (ctl !== e) begin failures++; $display("FAIL %s (%h): got %p exp %p", name, w, ctl, e); end
  endtask

  function automatic ctl_t base();
    ctl_t c = '0;
    c.wb_sel = WB_ALU; c.alu_op = ALU_ADD; c.acc_op = ACC_NONE; c.jump = JMP_NONE;
    return c;
  endfunction

  initial begin
    ctl_t e;
    e = base(); expect_ctl(16'h0E40, 0, e, "invalid slot");
    e = base(); expect_ctl(16'h0000, 1, e, "nop");
    // lw $3,0($0)
    e = base(); e.rf_we = 1; e.rf_wa = 3; e.wb_sel = WB_MEM; e.alu_b_imm = 1; expect_ctl(16'h8180, 1, e, "lw");
    // slti $1,$3,100
    e = base(); e.rf_we = 1; e.rf_wa = 1; e.alu_b_imm = 1; e.flags_we = 1; e.acc_load = 1; e.alu_op = ALU_SLT;
    expect_ctl(16'h2CE4, 1, e, "slti");
    // beq
    e = base(); e.alu_op = ALU_SUB; e.jump = JMP_BEQ; expect_ctl(16'hC407, 1, e, "beq");
    expect_ctl(16'hC001, 1, e, "beq loop");
    // add $4,$4,$3 and add $1,$2,$3
    e = base(); e.rf_we = 1; e.rf_wa = 4; e.flags_we = 1; e.acc_load = 1; expect_ctl(16'h0E40, 1, e, "add 0e40");
    e.rf_wa = 1; expect_ctl(16'h0990, 1, e, "add 0990");
    // addi $3,$3,1
    e = base(); e.rf_we = 1; e.rf_wa = 3; e.alu_b_imm = 1; e.flags_we = 1; e.acc_load = 1; expect_ctl(16'hED81, 1, e, "addi");
    // sub and or xor slt
    e = base(); e.rf_we = 1; e.rf_wa = 5; e.flags_we = 1; e.acc_load = 1;
    e.alu_op = ALU_SUB; expect_ctl(rtype(1, 2, 5, 1), 1, e, "sub");
    e.alu_op = ALU_AND; expect_ctl(rtype(1, 2, 5, 2), 1, e, "and");
    e.alu_op = ALU_OR;  expect_ctl(rtype(1, 2, 5, 3), 1, e, "or");
    e.alu_op = ALU_SLT; expect_ctl(rtype(1, 2, 5, 4), 1, e, "slt");
    e.alu_op = ALU_XOR; expect_ctl(rtype(1, 2, 5, 5), 1, e, "xor");
    // accumulator operations
    e = base(); e.rf_we = 1; e.rf_wa = 6; e.wb_sel = WB_ACC;
    e.acc_op = ACC_INC; expect_ctl(rtype(0, 0, 6, 6), 1, e, "inc");
    e.acc_op = ACC_DEC; expect_ctl(rtype(0, 0, 6, 7), 1, e, "dec");
    e.acc_op = ACC_CPL; expect_ctl(rtype(0, 0, 6, 9), 1, e, "cpl");
    e.acc_op = ACC_ROR; expect_ctl(rtype(0, 0, 6, 10), 1, e, "ror");
    e.acc_op = ACC_ROL; expect_ctl(rtype(0, 0, 6, 11), 1, e, "rol");
    // jr $7
    e = base(); e.rf_wa = 0; e.jump = JMP_JR; expect_ctl(rtype(7, 0, 0, 8), 1, e, "jr");
    // sw $1,5($2)
    e = base(); e.dm_we = 1; e.alu_b_imm = 1; expect_ctl({3'd5, 3'd2, 3'd1, 7'd5}, 1, e, "sw");
    // j, jal
    e = base(); e.jump = JMP_J; expect_ctl({3'd2, 13'd100}, 1, e, "j");
    e = base(); e.jump = JMP_JAL; e.rf_we = 1; e.rf_wa = 7; e.wb_sel = WB_LINK; expect_ctl({3'd3, 13'd100}, 1, e, "jal");
    // system group
    e = base(); e.rf_wa = 2; e.rf_we = 1; e.wb_sel = WB_INPORT; e.acc_load = 1; expect_ctl(rtype(0, 0, 2, 14), 1, e, "in");
    e = base(); e.rf_wa = 2; e.out_we = 1;   expect_ctl(rtype(0, 1, 2, 14), 1, e, "out");
    e = base(); e.rf_wa = 2; e.tx_start = 1; expect_ctl(rtype(0, 2, 2, 14), 1, e, "send");
    e = base(); e.rf_wa = 2; e.rf_we = 1; e.wb_sel = WB_RBUFF; e.acc_load = 1; e.rx_ack = 1; expect_ctl(rtype(0, 3, 2, 14), 1, e, "recv");
    e = base(); e.rf_wa = 2; e.rf_we = 1; e.wb_sel = WB_STATUS; expect_ctl(rtype(0, 4, 2, 14), 1, e, "status");
    e = base(); e.rf_wa = 0; e.intcon_we = 1; expect_ctl(rtype(3, 5, 0, 14), 1, e, "wintcon");
    e = base(); e.rf_wa = 0; e.clr_tmrf = 1;  expect_ctl(rtype(0, 6, 0, 14), 1, e, "clrtmrf");
    e = base(); e.rf_wa = 0; e.jump = JMP_RETI; expect_ctl(rtype(0, 7, 0, 14), 1, e, "reti");
    // unassigned funct codes do nothing
    e = base(); e.rf_wa = 1; expect_ctl(rtype(1, 1, 1, 12), 1, e, "funct 12");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
