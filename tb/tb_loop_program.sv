// tb_loop_program: runs the published example program, the loop
//     lw $3,0($0); Loop: slti $1,$3,100; beq $1,$0,Skip; add $4,$4,$3;
//     addi $3,$3,1; beq $0,$0,Loop
// with its exact instruction words (8180 2CE4 C407 0E40 ED81 C001) on the processor
// with 16-bit data registers, the width its published trace needs (the sum 4950).
// For every executed instruction it records the PC, the instruction, the ALU output
// and R1, R3, R4 as they are before write-back, which is what the published trace
// lists, and compares them with values computed here for loop index i:
// slti -> (i < 100), beq -> R1, add -> sum(0..i), addi -> i + 1, beq back -> 0.
// A few rows of the trace are also checked literally. It checks the exit to address 8
// and that an iteration takes 7 cycles (5 instructions and 2 for the taken beq).
// The program is then reloaded with the alternative bound of its listing,
// slti $1,$3,50 (2CB2), and run again: the sum must be 1225. The last rows of the
// first run are printed in the layout of the published trace.
module tb_loop_program;
  logic clk_src = 0, rst_n = 0, clk_core;
  logic [7:0] out_port;
  logic txout;
  logic ld_im_we = 0, ld_dm_we = 0;
  logic [17:0] ld_addr = 0;
  logic [15:0] ld_data = 0;
  logic dbg_exec, dbg_redirect, dbg_irq_take, dbg_tx2;
  logic [17:0] dbg_pc;
  logic [15:0] dbg_instr, dbg_alu, dbg_acc;
  logic [3:0] dbg_flags;
  int checks = 0, failures = 0;
  int rows = 0, literal_hits = 0, iterations = 0, cyc = 0, last2 = -1, bad_period = 0;
  int i_cur = -1;
  int limit = 100;
  logic exited = 0;

  risc8_top #(.DATA_W(16)) dut (
    .clk_src, .rst_n, .clk_core, .in_port(8'h00), .out_port, .rxin(1'b1), .txout,
    .int0(1'b0), .int1(1'b0), .ld_im_we, .ld_dm_we, .ld_addr, .ld_data,
    .dbg_exec, .dbg_pc, .dbg_instr, .dbg_alu, .dbg_acc, .dbg_flags,
    .dbg_redirect, .dbg_irq_take, .dbg_tx2
  );
  always #10 clk_src = ~clk_src;

  logic [15:0] prog [10] = '{16'h0000, 16'h8180, 16'h2CE4, 16'hC407, 16'h0E40,
                             16'hED81, 16'hC001, 16'h0000, 16'h0000, {3'd2, 13'd9}};

  function automatic int sum_to(input int n);  // 0 + 1 + ... + n
    return n * (n + 1) / 2;
  endfunction

  task automatic row(input int pc, input int ins, input int alu, input int r1, input int r3, input int r4);
    int e_alu, e_r1, e_r4;
    rows++;
    e_r4 = (i_cur <= 0) ? 0 : sum_to(i_cur - 1);
    case (pc)
      2: begin e_alu = (i_cur < limit); e_r1 = (i_cur == 0) ? 0 : 1; end
      3: begin e_alu = (i_cur < limit); e_r1 = (i_cur < limit); end
      4: begin e_alu = sum_to(i_cur); e_r1 = 1; end
      5: begin e_alu = i_cur + 1; e_r1 = 1; e_r4 = sum_to(i_cur); end
      default: begin e_alu = 0; e_r1 = 1; e_r4 = sum_to(i_cur); end
    endcase
    checks++;
    if (alu != e_alu || r1 != e_r1 || r4 != e_r4 || r3 != i_cur + ((pc == 6) ? 1 : 0)) begin
      failures++;
      $display("FAIL PC %0d %h alu=%0d R1=%0d R3=%0d R4=%0d (i=%0d exp alu %0d R1 %0d R4 %0d)",
               pc, ins, alu, r1, r3, r4, i_cur, e_alu, e_r1, e_r4);
    end
    if (limit == 100 && i_cur >= 98)
      $display("PC_out = %0d Instruction = %h Alu_output = %0d Reg1 = %0d Reg3 = %0d Reg4 = %0d",
               pc, 16'(ins), alu, r1, r3, r4);
    // rows printed in the published trace
    if ((pc == 4 && ins == 'h0e40 && alu == 4950 && r3 == 99 && r4 == 4851) ||
        (pc == 5 && ins == 'hed81 && alu == 95 && r1 == 1 && r3 == 94 && r4 == 4465) ||
        (pc == 3 && ins == 'hc407 && alu == 0 && r1 == 0 && r3 == 100 && r4 == 4950) ||
        (pc == 2 && ins == 'h2ce4 && alu == 1 && r3 == 97 && r4 == 4656))
      literal_hits++;
  endtask

  always @(posedge clk_core) if (!dut.rst) begin
    cyc++;
    if (dbg_exec) begin
      if (dbg_pc == 2) begin
        i_cur = int'(dut.u_rf.r[3]);
        if (last2 >= 0) begin iterations++; if (cyc - last2 != 7) bad_period++; end
        last2 = cyc;
      end
      if (dbg_pc >= 2 && dbg_pc <= 6)
        row(int'(dbg_pc), int'(dbg_instr), int'(dbg_alu), int'(dut.u_rf.r[1]),
            int'(dut.u_rf.r[3]), int'(dut.u_rf.r[4]));
      if (dbg_pc == 8) exited = 1;
    end
  end

  task automatic load_and_run();
    rst_n = 0; exited = 0; rows = 0; iterations = 0; last2 = -1; i_cur = -1;
    repeat (4) @(posedge clk_core);
    foreach (prog[k]) begin @(negedge clk_core); ld_im_we = 1; ld_addr = 18'(k); ld_data = prog[k]; end
    @(negedge clk_core); ld_im_we = 0; ld_dm_we = 1; ld_addr = 0; ld_data = 0;
    @(negedge clk_core); ld_dm_we = 0;
    rst_n = 1;
    wait (exited);
  endtask

  initial begin
    load_and_run();
    repeat (5) @(posedge clk_core);
    checks++; if (dut.u_rf.r[4] != 4950) begin failures++; $display("FAIL sum %0d", dut.u_rf.r[4]); end
    checks++; if (dut.u_rf.r[3] != 100) begin failures++; $display("FAIL i %0d", dut.u_rf.r[3]); end
    checks++; if (rows != 100 * 5 + 2) begin failures++; $display("FAIL rows %0d", rows); end
    checks++; if (literal_hits != 4) begin failures++; $display("FAIL published rows matched %0d of 4", literal_hits); end
    checks++; if (iterations != 100 || bad_period != 0) begin failures++; $display("FAIL iterations %0d bad %0d", iterations, bad_period); end
    // second run: bound 50
    limit = 50; prog[2] = 16'h2CB2;
    load_and_run();
    repeat (5) @(posedge clk_core);
    checks++; if (dut.u_rf.r[4] != 1225) begin failures++; $display("FAIL sum(0..49) %0d", dut.u_rf.r[4]); end
    checks++; if (dut.u_rf.r[3] != 50) begin failures++; $display("FAIL i %0d", dut.u_rf.r[3]); end
    checks++; if (rows != 50 * 5 + 2 || iterations != 50 || bad_period != 0) begin
      failures++; $display("FAIL rows %0d iterations %0d", rows, iterations);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_src);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
