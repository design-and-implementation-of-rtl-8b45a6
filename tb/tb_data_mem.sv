// tb_data_mem: self-checking test of the 4096 x 8 data memory.
// Writes every location with a value derived from its address, checks that writes
// without the clock enable are ignored, then reads every location back.
module tb_data_mem;
  logic clk = 0, clk_en = 0, we = 0;
  logic [11:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  data_mem dut (.clk, .clk_en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  function automatic logic [7:0] pat(input int a, input int k);
    return 8'((a * 37) ^ (a >> 4) ^ k);
  endfunction

  initial begin
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk); addr = 12'(a); wdata = pat(a, 0); we = 1; clk_en = 1;
    end
    // writes with the clock enable low must not land
    for (int a = 0; a < 4096; a += 3) begin
      @(negedge clk); addr = 12'(a); wdata = pat(a, 8'h5A); we = 1; clk_en = 0;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 4096; a++) begin
      addr = 12'(a); #1; checks++;
      if (rdata !== pat(a, 0)) begin failures++; if (failures < 10) $display("FAIL %0d: %h", a, rdata); end
    end
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
