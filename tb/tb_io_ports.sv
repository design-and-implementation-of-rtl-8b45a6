// tb_io_ports: self-checking test of the I/O ports.
// The input port must reach in_data exactly two clocks after the pins change; the
// output port must take the accumulator only on out_we and hold otherwise.
module tb_io_ports;
  logic clk = 0, rst = 1, out_we = 0;
  logic [7:0] pin = 0, in_data, acc = 0, pout;
  logic [7:0] hist [3];
  logic [7:0] pmodel;
  int checks = 0, failures = 0;

  io_ports dut (.clk, .rst, .pin, .in_data, .out_we, .acc, .pout);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0; pmodel = 0; hist = '{default: 0};
    for (int i = 0; i < 300; i++) begin
      pin = 8'($urandom); acc = 8'($urandom); out_we = 1'($urandom);
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = pin;
      if (out_we) pmodel = acc;
      #1;
      checks += 2;
      if (i >= 2 && in_data !== hist[1]) begin failures++; $display("FAIL in_data=%h exp %h", in_data, hist[1]); end
      if (pout !== pmodel) begin failures++; $display("FAIL pout=%h exp %h", pout, pmodel); end
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
