// tb_tstate_counter: self-checking test of the pipeline sequencer.
// Checks reset (no valid IR in the first cycle), steady TX1 flow, that a redirect is
// followed by exactly one TX2 cycle with fetch from PCR and two bubbles in IRX, and
// that an interrupt is accepted only in TX1 without a redirect and with a valid IR.
module tb_tstate_counter;
  logic clk = 0, rst = 1, redirect = 0, irq = 0;
  logic tx2, advance, irx_load, irq_take, ir_valid;
  int checks = 0, failures = 0;

  tstate_counter dut (.clk, .rst, .redirect, .irq, .tx2, .advance, .irx_load, .irq_take, .ir_valid);
  always #5 clk = ~clk;

  task automatic expect_s(input logic e_tx2, input logic e_adv, input logic e_irx, input logic e_take,
                          input logic e_v, input string what);
    #1; checks++;
    if ({tx2, advance, irx_load, irq_take, ir_valid} !== {e_tx2, e_adv, e_irx, e_take, e_v}) begin
      failures++;
      $display("FAIL %s: tx2=%b adv=%b irx=%b take=%b v=%b", what, tx2, advance, irx_load, irq_take, ir_valid);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    expect_s(0, 1, 1, 0, 0, "first cycle after reset");
    irq = 1; expect_s(0, 1, 1, 0, 0, "irq with empty IR");
    irq = 0;
    @(negedge clk); expect_s(0, 1, 1, 0, 1, "tx1");
    // redirect
    redirect = 1; expect_s(0, 0, 0, 0, 1, "redirect cycle");
    @(negedge clk); redirect = 0;
    expect_s(1, 0, 0, 0, 0, "tx2");
    irq = 1; expect_s(1, 0, 0, 0, 0, "no irq in tx2");
    irq = 0;
    @(negedge clk); expect_s(0, 1, 1, 0, 1, "back to tx1");
    // redirect has priority over irq
    redirect = 1; irq = 1; expect_s(0, 0, 0, 0, 1, "redirect beats irq");
    @(negedge clk); redirect = 0; irq = 0; expect_s(1, 0, 0, 0, 0, "tx2 again");
    @(negedge clk);
    irq = 1; expect_s(0, 0, 0, 1, 1, "irq accepted");
    @(negedge clk); irq = 0; expect_s(1, 0, 0, 0, 0, "tx2 after irq");
    @(negedge clk); expect_s(0, 1, 1, 0, 1, "isr flow");
    // sustained flow
    for (int i = 0; i < 20; i++) begin @(negedge clk); expect_s(0, 1, 1, 0, 1, "steady"); end
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
