// tb_instr_mem: self-checking test of the 262,144 x 16 instruction memory.
// Writes a pattern to the first and last 2048 words and to random addresses through
// the load port, then reads them back on the fetch port.
module tb_instr_mem;
  logic clk = 0, we = 0;
  logic [17:0] raddr = 0, waddr = 0;
  logic [15:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [17:0] ra [256];

  instr_mem dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  function automatic logic [15:0] pat(input logic [17:0] a);
    return 16'(a * 16'h9E37) ^ 16'(a >> 2);
  endfunction

  task automatic wr(input logic [17:0] a);
    @(negedge clk); waddr = a; wdata = pat(a); we = 1;
  endtask

  initial begin
    for (int a = 0; a < 2048; a++) wr(18'(a));
    for (int a = 0; a < 2048; a++) wr(18'(262143 - a));
    foreach (ra[i]) begin ra[i] = 18'($urandom); wr(ra[i]); end
    @(negedge clk); we = 0;
    for (int a = 0; a < 2048; a++) begin
      raddr = 18'(a); #1; checks++; if (rdata !== pat(raddr)) failures++;
      raddr = 18'(262143 - a); #1; checks++; if (rdata !== pat(raddr)) failures++;
    end
    foreach (ra[i]) begin raddr = ra[i]; #1; checks++; if (rdata !== pat(raddr)) failures++; end
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
