// tb_interrupt_module: self-checking test of the interrupt module.
// Checks the timer period (TMF0 every 1024 clocks) and CLRTMRF, the INTCON enables
// and the I1 mask, the fixed priority I0 > timer > I1 with their vectors, that
// requests wait while a service routine runs, and that I0 cannot be masked.
module tb_interrupt_module;
  logic clk = 0, rst = 1, int0 = 0, int1 = 0, intcon_we = 0, clr_tmrf = 0, take = 0, reti = 0;
  logic [2:0] intcon_wd = 0, intcon;
  logic irq, tmf0, in_isr;
  logic [17:0] vector;
  logic [9:0] timer;
  int checks = 0, failures = 0;

  interrupt_module dut (.clk, .rst, .int0, .int1, .intcon_we, .intcon_wd, .clr_tmrf, .take, .reti,
                        .irq, .vector, .intcon, .tmf0, .in_isr, .timer);
  always #5 clk = ~clk;

  task automatic expect_irq(input logic e, input logic [17:0] v, input string what);
    #1; checks++;
    if (irq !== e || (e && vector !== v)) begin
      failures++; $display("FAIL %s: irq=%b vector=%h", what, irq, vector);
    end
  endtask
  task automatic pulse(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  task automatic wr_intcon(input logic [2:0] v);
    @(negedge clk); intcon_wd = v; intcon_we = 1; @(negedge clk); intcon_we = 0;
  endtask
  task automatic accept(); @(negedge clk); take = 1; @(negedge clk); take = 0; endtask
  task automatic ret(); @(negedge clk); reti = 1; @(negedge clk); reti = 0; endtask

  initial begin
    int t_set, t_prev;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // timer: TMF0 rises every 1024 cycles
    t_prev = -1;
    for (int k = 0; k < 3; k++) begin
      @(posedge tmf0); t_set = $time / 10;
      if (t_prev >= 0) begin
        checks++; if (t_set - t_prev != 1024) begin failures++; $display("FAIL timer period %0d", t_set - t_prev); end
      end
      t_prev = t_set;
      expect_irq(0, 0, "timer disabled");
      pulse(clr_tmrf);
      #1 checks++; if (tmf0) begin failures++; $display("FAIL CLRTMRF"); end
    end
    // I1 disabled by INTCON = 0
    pulse(int1); repeat (4) @(negedge clk);
    expect_irq(0, 0, "I1 with INTCON=0");
    wr_intcon(3'b011);  // external enabled, I1 masked
    expect_irq(0, 0, "I1 masked");
    wr_intcon(3'b010);
    expect_irq(1, 18'h30, "I1 enabled");
    // I0 is non-maskable and outranks I1
    wr_intcon(3'b000);
    pulse(int0); repeat (4) @(negedge clk);
    expect_irq(1, 18'h10, "I0 with INTCON=0");
    wr_intcon(3'b110);
    expect_irq(1, 18'h10, "I0 over I1");
    accept();
    #1 checks++; if (!in_isr) begin failures++; $display("FAIL in_isr"); end
    expect_irq(0, 0, "blocked in ISR");
    ret();
    expect_irq(1, 18'h30, "I1 after I0 served");
    // timer outranks I1
    @(posedge tmf0); @(negedge clk);
    expect_irq(1, 18'h20, "timer over I1");
    accept(); expect_irq(0, 0, "blocked in timer ISR");
    pulse(clr_tmrf); ret();
    expect_irq(1, 18'h30, "I1 last");
    accept(); ret();
    expect_irq(0, 0, "all served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
