// tb_clock_unit: self-checking test of clock generation, reset release, baud tick
// and the low-power unit's clock enables, at the default parameters
// (50 MHz source, divide by 2, 25 MHz core, 115200 baud x 8).
module tb_clock_unit;
  logic clk_src = 0, rst_n = 0, clk_core, rst, baud_tick;
  logic rf_wr = 0, dm_wr = 0, rf_clk_en, dm_clk_en;
  int checks = 0, failures = 0;
  int src_edges = 0, core_edges = 0, last_tick = -1, ticks = 0;

  clock_unit dut (.clk_src, .rst_n, .clk_core, .rst, .baud_tick, .rf_wr, .dm_wr, .rf_clk_en, .dm_clk_en);
  always #10 clk_src = ~clk_src;   // 50 MHz

  always @(posedge clk_src) src_edges++;
  always @(posedge clk_core) begin
    core_edges++;
    if (baud_tick) begin
      if (last_tick >= 0) begin
        checks++;
        if (core_edges - last_tick != 27) begin failures++; $display("FAIL tick interval %0d", core_edges - last_tick); end
      end
      last_tick = core_edges;
      ticks++;
    end
  end

  initial begin
    int s0, c0;
    repeat (5) @(posedge clk_src);
    checks++; if (!rst) begin failures++; $display("FAIL rst not held"); end
    rst_n = 1;
    repeat (3) @(posedge clk_core);
    #1; checks++; if (rst) begin failures++; $display("FAIL rst not released"); end
    s0 = src_edges; c0 = core_edges;
    repeat (1000) @(posedge clk_src);
    checks++;
    if (core_edges - c0 < 499 || core_edges - c0 > 501) begin failures++; $display("FAIL core edges %0d", core_edges - c0); end
    // enables follow the write requests combinationally
    for (int i = 0; i < 20; i++) begin
      rf_wr = 1'($urandom); dm_wr = 1'($urandom); #1;
      checks += 2;
      if (rf_clk_en !== rf_wr) failures++;
      if (dm_clk_en !== dm_wr) failures++;
    end
    repeat (27 * 20) @(posedge clk_core);
    checks++; if (ticks < 20) begin failures++; $display("FAIL only %0d ticks", ticks); end
    // asynchronous reset assertion
    #3 rst_n = 0; #1;
    checks++; if (!rst) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk_src);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
