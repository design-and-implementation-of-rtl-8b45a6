// tb_control_unit: self-checking test of the control unit (IR, IRX, tstate counter,
// decoder) together with the program counter unit that feeds it.
// A testbench memory holds addi instructions tagged with their own address, a j, a
// taken and a not-taken beq, and a return from interrupt at the end of a service
// routine. The sequence of executed addresses is compared with the expected flow, and
// every redirect and interrupt entry must cost exactly two bubble cycles.
module tb_control_unit;
  import risc_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] mem [128];
  logic [15:0] fetch_data, ir, irx;
  logic [17:0] fetch_addr, ir_pc, irx_pc, pc, pcr, pcs, stackpc, link;
  logic irx_valid, redirect, irq_take, advance, tx2, eq, irq, irq_arm;
  ctl_t ctl;
  int checks = 0, failures = 0;
  int expected [$];
  int got [$];
  int bubbles = 0, cycles = 0;

  assign fetch_data = mem[fetch_addr[6:0]];
  assign eq = (irx_pc == 22);
  assign irq = irq_arm && irx_valid && irx_pc == 46;

  control_unit dut (.clk, .rst, .fetch_data, .fetch_addr, .eq, .irq, .ctl, .ir, .ir_pc, .irx,
                    .irx_pc, .irx_valid, .redirect, .irq_take, .advance, .tx2);
  pc_unit u_pc (.clk, .rst, .advance, .from_pcr(tx2), .redirect, .jump(ctl.jump), .irx_pc,
                .imm7(irx[6:0]), .target13(irx[12:0]), .reg_rs(8'd0), .irq_take,
                .vector(18'd60), .ret_pc(ir_pc), .fetch_addr, .pc, .pcr, .pcs, .stackpc, .link);
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    cycles++;
    if (irx_valid) begin
      got.push_back(int'(irx_pc));
      checks++;
      if (irx[6:0] != irx_pc[6:0] && irx[15:13] == 3'd7) begin
        failures++; $display("FAIL IRX %h does not belong to pc %0d", irx, irx_pc);
      end
    end else bubbles++;
    if (irq_take) irq_arm <= 1'b0;
  end

  initial begin
    for (int a = 0; a < 128; a++) mem[a] = {3'd7, 3'd0, 3'd1, 7'(a)};  // addi $1,$0,a
    mem[5]  = {3'd2, 13'd20};                    // j 20
    mem[22] = {3'd6, 3'd1, 3'd2, 7'd40};         // beq -> 41 (taken)
    mem[43] = {3'd6, 3'd1, 3'd2, 7'd10};         // beq not taken
    mem[62] = {3'd0, 3'd0, 3'd7, 3'd0, 4'd14};   // reti
    expected = '{0, 1, 2, 3, 4, 5, 20, 21, 22, 41, 42, 43, 44, 45, 46, 60, 61, 62, 47, 48, 49, 50};
    irq_arm = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (got.size() == expected.size());
    @(negedge clk);
    foreach (expected[i]) begin
      checks++;
      if (got[i] != expected[i]) begin failures++; $display("FAIL step %0d: pc %0d exp %0d", i, got[i], expected[i]); end
    end
    // two empty cycles while the pipeline fills after reset, then 2 bubbles for each of j, beq, irq entry, reti
    checks++;
    if (bubbles != 2 + 2 * 4) begin failures++; $display("FAIL bubbles %0d", bubbles); end
    checks++;
    if (cycles != expected.size() + 2 + 2 * 4) begin failures++; $display("FAIL cycles %0d", cycles); end
    checks++;
    if (stackpc != 47) begin failures++; $display("FAIL stackpc %0d", stackpc); end
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
