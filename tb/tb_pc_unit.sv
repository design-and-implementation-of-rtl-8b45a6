// tb_pc_unit: self-checking test of the program counter unit.
// Checks increment on fetch, the TX2 fetch from PCR, and the targets of beq (field+1
// within the 128-word page), j, jal (with PCS and link), jr, interrupt entry with
// STACKPC, and return from interrupt.
module tb_pc_unit;
  import risc_pkg::*;
  logic clk = 0, rst = 1, advance = 0, from_pcr = 0, redirect = 0, irq_take = 0;
  jump_e jump = JMP_NONE;
  logic [17:0] irx_pc = 0, vector = 0, ret_pc = 0, fetch_addr, pc, pcr, pcs, stackpc, link;
  logic [6:0] imm7 = 0;
  logic [12:0] target13 = 0;
  logic [7:0] reg_rs = 0;
  int checks = 0, failures = 0;

  pc_unit dut (.clk, .rst, .advance, .from_pcr, .redirect, .jump, .irx_pc, .imm7, .target13, .reg_rs,
               .irq_take, .vector, .ret_pc, .fetch_addr, .pc, .pcr, .pcs, .stackpc, .link);
  always #5 clk = ~clk;

  task automatic chk(input logic [17:0] got, input logic [17:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  // One redirect: execute cycle loads PCR, then TX2 fetches from it.
  task automatic do_jump(input jump_e j, input logic [17:0] exp);
    @(negedge clk); jump = j; redirect = 1; advance = 0;
    @(negedge clk); redirect = 0; jump = JMP_NONE; from_pcr = 1; #1;
    chk(pcr, exp, "pcr"); chk(fetch_addr, exp, "tx2 fetch");
    @(negedge clk); from_pcr = 0;
    chk(pc, exp + 1, "pc after tx2");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(pc, 0, "reset");
    advance = 1;
    repeat (5) @(negedge clk);
    chk(pc, 5, "increment"); chk(fetch_addr, 5, "fetch addr");
    // beq: field 1 from page of pc 6 -> 2 (the published loop)
    irx_pc = 18'd6; imm7 = 7'd1; do_jump(JMP_BEQ, 18'd2);
    irx_pc = 18'h1234F; imm7 = 7'h7F; do_jump(JMP_BEQ, 18'h12380);
    // j/jal keep the upper 5 bits
    irx_pc = 18'h2ABCD; target13 = 13'h1234; do_jump(JMP_J, 18'h2B234);
    irx_pc = 18'h0A001; target13 = 13'h0777; do_jump(JMP_JAL, 18'h0A777);
    chk(pcs, 18'h0A002, "pcs"); chk(link, 18'h0A002, "link");
    // jr: low 8 bits from the register, upper from PCS
    reg_rs = 8'h02; do_jump(JMP_JR, 18'h0A002);
    // interrupt entry
    @(negedge clk); irq_take = 1; vector = 18'h20; ret_pc = 18'h0A005;
    @(negedge clk); irq_take = 0; from_pcr = 1; #1;
    chk(stackpc, 18'h0A005, "stackpc"); chk(fetch_addr, 18'h20, "vector fetch");
    @(negedge clk); from_pcr = 0; advance = 1;
    @(negedge clk);
    chk(pc, 18'h22, "in isr");
    do_jump(JMP_RETI, 18'h0A005);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
