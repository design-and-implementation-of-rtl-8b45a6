// tb_risc8_top: end-to-end test of the whole processor at its default parameters
// (8-bit data, 262,144-word instruction memory, 4096-word data memory, 50 MHz board
// clock divided to 25 MHz, 115200-baud UART, 10-bit timer).
// The program is assembled here and loaded through the load port during reset:
//   0-6   the published loop (sum of 0..99 into R4; 8-bit wrap gives 4950 mod 256)
//   0x10  I0 service routine, 0x20 timer routine, 0x30 I1 routine: each counts
//         its calls in data memory (words 1, 2, 3) and returns
//   0x38  subroutine called with jal, returns with jr $7
//   0x40  main: stores, accumulator operations, input/output ports, status word,
//         xor/or/slt,
//         UART send looped back to the receiver, then enables interrupts and waits
//         for all three, disables them and writes 7E to the output port.
// txout is wired back to rxin. The testbench pulses I1 while it is disabled (it must
// wait), and later I0 and I1 together (I0 must win). It counts every mechanism it
// expects to see (taken and untaken branches, TX2 cycles, each interrupt, priority,
// masking, the clock enables of the low-power unit, UART frames) and fails any that
// never happened. Results are compared with values worked out by hand.
module tb_risc8_top;
  import risc_pkg::*;
  logic clk_src = 0, rst_n = 0, clk_core;
  logic [7:0] in_port = 8'h3C, out_port;
  logic rxin, txout, int0 = 0, int1 = 0;
  logic ld_im_we = 0, ld_dm_we = 0;
  logic [17:0] ld_addr = 0;
  logic [15:0] ld_data = 0;
  logic dbg_exec, dbg_redirect, dbg_irq_take, dbg_tx2;
  logic [17:0] dbg_pc;
  logic [15:0] dbg_instr;
  logic [7:0] dbg_alu, dbg_acc;
  logic [3:0] dbg_flags;

  int checks = 0, failures = 0;
  int n_taken = 0, n_untaken = 0, n_tx2 = 0, n_i0 = 0, n_tmr = 0, n_i1 = 0, n_prio = 0;
  int n_masked = 0, n_rf_off = 0, n_dm_on = 0, n_frames = 0, n_out = 0, n_exec = 0;
  int last_loop = -1, loop_period_bad = 0, loop_periods = 0;
  logic [7:0] first_out = 0, uart_byte = 0, prev_out = 0;
  int r3_at_exit = -1;
  time last_loop_t = 0;

  assign rxin = txout;

  risc8_top dut (
    .clk_src, .rst_n, .clk_core, .in_port, .out_port, .rxin, .txout, .int0, .int1,
    .ld_im_we, .ld_dm_we, .ld_addr, .ld_data,
    .dbg_exec, .dbg_pc, .dbg_instr, .dbg_alu, .dbg_acc, .dbg_flags,
    .dbg_redirect, .dbg_irq_take, .dbg_tx2
  );

  always #10 clk_src = ~clk_src;   // 50 MHz board clock

  // ---------------- assembler ----------------
  function automatic logic [15:0] R(int fn, int rs, int rt, int rd);
    return {3'd0, 3'(rs), 3'(rt), 3'(rd), 4'(fn)};
  endfunction
  function automatic logic [15:0] I(int op, int rs, int rt, int imm);
    return {3'(op), 3'(rs), 3'(rt), 7'(imm)};
  endfunction
  function automatic logic [15:0] J(int op, int target);
    return {3'(op), 13'(target)};
  endfunction
  function automatic logic [15:0] SYS(int sub, int rs, int rd);
    return R(14, rs, sub, rd);
  endfunction
  localparam int LW = 4, SW = 5, BEQ = 6, ADDI = 7, JJ = 2, JAL = 3;

  logic [15:0] prog [256];
  int a;
  task automatic emit(input logic [15:0] w); prog[a] = w; a++; endtask

  task automatic assemble();
    int wu, w1, w2, w3, h;
    foreach (prog[i]) prog[i] = 16'h0000;
    // the published loop, word for word
    prog[0] = 16'h0000; prog[1] = 16'h8180; prog[2] = 16'h2CE4; prog[3] = 16'hC407;
    prog[4] = 16'h0E40; prog[5] = 16'hED81; prog[6] = 16'hC001;
    prog[8] = J(JJ, 'h40);
    // interrupt service routines
    a = 'h10; emit(I(LW, 0, 6, 1)); emit(I(ADDI, 6, 6, 1)); emit(I(SW, 0, 6, 1)); emit(SYS(7, 0, 0));
    a = 'h20; emit(I(LW, 0, 6, 2)); emit(I(ADDI, 6, 6, 1)); emit(I(SW, 0, 6, 2)); emit(SYS(6, 0, 0)); emit(SYS(7, 0, 0));
    a = 'h30; emit(I(LW, 0, 6, 3)); emit(I(ADDI, 6, 6, 1)); emit(I(SW, 0, 6, 3)); emit(SYS(7, 0, 0));
    // subroutine
    a = 'h38; emit(I(ADDI, 0, 5, 'h21)); emit(R(8, 7, 0, 0));
    // main
    a = 'h40;
    emit(I(SW, 0, 4, 4));
    emit(J(JAL, 'h38));
    emit(I(SW, 0, 5, 5));
    emit(I(ADDI, 0, 2, 'h5A));
    emit(R(6, 0, 0, 2));  emit(I(SW, 0, 2, 6));    // inc
    emit(R(11, 0, 0, 2)); emit(I(SW, 0, 2, 7));    // rol
    emit(R(10, 0, 0, 2)); emit(I(SW, 0, 2, 8));    // ror
    emit(R(9, 0, 0, 2));  emit(I(SW, 0, 2, 9));    // cpl
    emit(SYS(4, 0, 5));   emit(I(SW, 0, 5, 16));   // status after cpl (P from ACC)
    emit(R(7, 0, 0, 2));  emit(I(SW, 0, 2, 10));   // dec
    emit(SYS(0, 0, 2));                            // in  $2
    emit(SYS(1, 0, 0));                            // out
    emit(I(ADDI, 0, 1, 1));
    emit(R(1, 0, 1, 2));                           // sub $2,$0,$1 -> FF, borrow
    emit(SYS(4, 0, 2)); emit(I(SW, 0, 2, 11));     // status
    emit(I(ADDI, 0, 2, 'h33)); emit(I(ADDI, 0, 5, 'h0F));
    emit(R(5, 2, 5, 2)); emit(I(SW, 0, 2, 13));    // xor -> 3C
    emit(R(3, 2, 5, 2)); emit(I(SW, 0, 2, 14));    // or  -> 3F
    emit(R(4, 5, 2, 2)); emit(I(SW, 0, 2, 15));    // slt 0F < 3F -> 1
    emit(I(ADDI, 0, 2, 'h65));
    emit(SYS(2, 0, 0));                            // send
    emit(I(ADDI, 0, 3, 1));
    wu = a;
    emit(SYS(4, 0, 2)); emit(R(2, 2, 3, 2)); emit(I(BEQ, 2, 0, wu - 1));
    emit(SYS(3, 0, 2)); emit(I(SW, 0, 2, 12));     // recv
    emit(I(ADDI, 0, 2, 6)); emit(SYS(5, 2, 0));    // INTCON = 110
    w1 = a; emit(I(LW, 0, 2, 1)); emit(I(BEQ, 2, 0, w1 - 1));
    w2 = a; emit(I(LW, 0, 2, 2)); emit(I(BEQ, 2, 0, w2 - 1));
    w3 = a; emit(I(LW, 0, 2, 3)); emit(I(BEQ, 2, 0, w3 - 1));
    emit(SYS(5, 0, 0));                            // INTCON = 0
    emit(I(ADDI, 0, 2, 'h7E)); emit(SYS(1, 0, 0));
    h = a; emit(J(JJ, h));
  endtask

  // ---------------- monitors ----------------
  always @(posedge clk_core) if (rst_n && !dut.rst) begin
    if (dbg_exec) n_exec++;
    if (dbg_redirect) n_taken++;
    if (dbg_exec && dbg_instr[15:13] == 3'd6 && !dbg_redirect) n_untaken++;
    if (dbg_tx2) n_tx2++;
    if (dbg_irq_take) begin
      if (dut.u_int.vector == 18'h10) begin n_i0++; if (dut.u_int.pend1) n_prio++; end
      else if (dut.u_int.vector == 18'h20) n_tmr++;
      else n_i1++;
    end
    if (dut.u_int.pend1 && !dut.u_int.irq && dut.u_int.intcon == 3'b000) n_masked++;
    if (!dut.rf_clk_en) n_rf_off++;
    if (dbg_exec && dbg_pc == 18'd8) r3_at_exit = int'(dut.u_rf.r[3]);
    if (out_port != prev_out) begin
      if (n_out == 0) first_out = out_port;
      n_out++;
    end
    prev_out = out_port;
    if (dut.dm_clk_en) n_dm_on++;
    if (dbg_exec && dbg_pc == 18'd2) begin
      if (last_loop >= 0) begin
        loop_periods++;
        // 5 instructions + 2 TX2/bubble cycles for the taken beq
        if (($time - last_loop_t) != 7 * 40) loop_period_bad++;
      end
      last_loop = n_exec; last_loop_t = $time;
    end
  end


  // independent UART decoder on txout (bit = 217 core clocks at 115200 baud)
  initial begin
    forever begin
      @(negedge txout);
      if (dut.rst) continue;
      repeat (217 * 2 / 2 + 108) @(posedge clk_core);   // middle of bit 0
      for (int b = 0; b < 8; b++) begin
        uart_byte[b] = txout;
        if (b < 7) repeat (216) @(posedge clk_core);
      end
      n_frames++;
    end
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp); end
  endtask
  task automatic happened(input int n, input string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    assemble();
    repeat (4) @(posedge clk_core);
    foreach (prog[i]) begin
      @(negedge clk_core); ld_im_we = 1; ld_addr = 18'(i); ld_data = prog[i];
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk_core); ld_im_we = 0; ld_dm_we = 1; ld_addr = 18'(i); ld_data = 16'h0000;
    end
    @(negedge clk_core); ld_dm_we = 0;
    rst_n = 1;
    // I1 while interrupts are disabled: must wait
    wait (dut.tx_busy == 1'b1);
    @(negedge clk_core); int1 = 1; repeat (4) @(negedge clk_core); int1 = 0;
    // once I1 and the timer have been served, fire I0 and I1 together
    wait (n_i1 >= 1 && n_tmr >= 1);
    repeat (20) @(negedge clk_core);
    int0 = 1; int1 = 1; repeat (4) @(negedge clk_core); int0 = 0; int1 = 0;
    wait (out_port == 8'h7E);
    repeat (10) @(negedge clk_core);

    chk(r3_at_exit, 100, "loop counter R3 at loop exit");
    chk(dut.u_rf.r[4], 4950 % 256, "loop sum R4 (8-bit)");
    chk(dut.u_dm.mem[4], 4950 % 256, "stored sum");
    chk(dut.u_dm.mem[5], 'h21, "subroutine result");
    chk(dut.u_dm.mem[6], 'h5B, "inc");
    chk(dut.u_dm.mem[7], 'hB6, "rol");
    chk(dut.u_dm.mem[8], 'h5B, "ror");
    chk(dut.u_dm.mem[9], 'hA4, "cpl");
    chk(dut.u_dm.mem[10], 'hA3, "dec");
    chk(first_out, 'h3C, "input port copied to output port");
    chk(dut.u_dm.mem[11] >> 4, 4'b0010, "status flags after 0-1 (Z C B P)");
    chk(dut.u_dm.mem[12], 'h65, "UART loopback byte");
    chk(dut.u_dm.mem[13], 'h3C, "xor");
    chk(dut.u_dm.mem[14], 'h3F, "or");
    chk(dut.u_dm.mem[15], 1, "slt");
    chk(dut.u_dm.mem[16] >> 4, 4'b0001, "status after cpl: P set by the accumulator");
    chk(uart_byte, 'h65, "UART frame on txout");
    chk(dut.u_dm.mem[1], 1, "I0 served once");
    chk(dut.u_dm.mem[3], 2, "I1 served twice");
    checks++; if (dut.u_dm.mem[2] < 1) begin failures++; $display("FAIL timer never served"); end
    chk(out_port, 'h7E, "final output");
    chk(loop_period_bad, 0, "loop iteration = 7 cycles (5 instructions + 2 for the taken beq)");
    $display("mechanisms:");
    happened(n_taken, "taken branch/jump (redirect)");
    happened(n_untaken, "branch not taken");
    happened(n_tx2, "TX2 cycle");
    happened(loop_periods, "loop iterations timed");
    happened(n_i0, "I0 interrupt");
    happened(n_tmr, "timer interrupt");
    happened(n_i1, "I1 interrupt");
    happened(n_prio, "I0 taken over pending I1");
    happened(n_masked, "I1 held while disabled");
    happened(n_rf_off, "register set clock gated off");
    happened(n_dm_on, "data memory clock enabled");
    happened(n_frames, "UART frame");
    happened(n_out, "output port write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk_src);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
