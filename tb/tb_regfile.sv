// tb_regfile: self-checking test of the register set.
// Random writes (with and without the low-power clock enable) and reads on both
// ports are compared with a model; R0 must always read zero and every register must
// clear on reset.
module tb_regfile;
  localparam int W = 8;
  logic clk = 0, rst = 1, clk_en = 0, we = 0;
  logic [2:0] wa = 0, ra = 0, rb = 0;
  logic [W-1:0] wd = 0, da, db;
  logic [W-1:0] model [8];
  int checks = 0, failures = 0;

  regfile #(.DATA_W(W), .NREG(8)) dut (.clk, .rst, .clk_en, .we, .wa, .wd, .ra, .rb, .da, .db);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 8; i++) begin
      ra = 3'(i); #1; checks++;
      if (da !== 0) begin failures++; $display("FAIL reset R%0d", i); end
    end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); clk_en = 1'($urandom) | (i % 3 == 0); wa = 3'($urandom); wd = W'($urandom);
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      checks += 2;
      if (da !== model[ra]) begin failures++; $display("FAIL da R%0d=%h exp %h", ra, da, model[ra]); end
      if (db !== model[rb]) begin failures++; $display("FAIL db R%0d=%h exp %h", rb, db, model[rb]); end
      @(posedge clk);
      if (we && clk_en && wa != 0) model[wa] = wd;
      #1;
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
