// tb_serial_module: self-checking test of the UART.
// The baud tick runs every TICK clocks, so one bit lasts 8*TICK clocks. The
// transmitter sends random bytes while, at the same time (full duplex), the
// testbench drives frames into the receiver. An independent decoder checks the
// transmitted frames (start bit, LSB-first data, stop bit, bit length); received
// bytes must appear in RBUFF with rx_ready, and a frame with a bad stop bit must be
// dropped.
module tb_serial_module;
  localparam int TICK = 4;
  localparam int BIT  = 8 * TICK;
  logic clk = 0, rst = 1, baud_tick = 0;
  logic tx_start = 0, tx_busy, txout, rxin = 1, rx_ack = 0, rx_ready;
  logic [7:0] tx_data = 0, rbuff;
  int checks = 0, failures = 0;
  int tick_cnt = 0;
  logic [7:0] sent [16];
  logic [7:0] rsent [16];
  int n_dec = 0, n_rx = 0;

  serial_module #(.OVERSAMPLE(8)) dut (
    .clk, .rst, .baud_tick, .tx_start, .tx_data, .tx_busy, .txout,
    .rxin, .rx_ack, .rbuff, .rx_ready
  );
  always #5 clk = ~clk;

  always @(posedge clk) begin
    tick_cnt <= (tick_cnt == TICK - 1) ? 0 : tick_cnt + 1;
    baud_tick <= (tick_cnt == TICK - 1);
  end

  // Independent decoder of txout.
  initial begin
    logic [7:0] v;
    int t0, t1;
    forever begin
      @(negedge txout);
      t0 = $time;
      repeat (BIT / 2) @(posedge clk);
      checks++; if (txout !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int b = 0; b < 8; b++) begin
        repeat (BIT) @(posedge clk);
        v[b] = txout;
      end
      repeat (BIT) @(posedge clk);
      checks++; if (txout !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      // frame length: start + 8 data + stop within one tick of 10 bit periods
      wait (tx_busy == 1'b0);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 < 10 * BIT - 2 * TICK || (t1 - t0) / 10 > 10 * BIT + 2 * TICK) begin
        failures++; $display("FAIL frame length %0d clocks", (t1 - t0) / 10);
      end
      checks++;
      if (v !== sent[n_dec]) begin failures++; $display("FAIL tx byte %h exp %h", v, sent[n_dec]); end
      n_dec++;
    end
  end

  task automatic drive_frame(input logic [7:0] v, input logic stop);
    rxin = 0; repeat (BIT) @(posedge clk);
    for (int b = 0; b < 8; b++) begin rxin = v[b]; repeat (BIT) @(posedge clk); end
    rxin = stop; repeat (BIT) @(posedge clk);
    rxin = 1; repeat (BIT) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      begin : tx_side
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          sent[i] = (i == 0) ? 8'h55 : (i == 1) ? 8'h80 : 8'($urandom);
          tx_data = sent[i]; tx_start = 1;
          @(negedge clk); tx_start = 0; tx_data = ~sent[i];
          // a second start while busy must be ignored
          @(negedge clk); tx_start = 1; @(negedge clk); tx_start = 0;
          wait (tx_busy == 1'b0);
          repeat (3) @(posedge clk);
        end
      end
      begin : rx_side
        for (int i = 0; i < 16; i++) begin
          rsent[i] = (i == 0) ? 8'h01 : 8'($urandom);
          drive_frame(rsent[i], 1'b1);
          checks++;
          if (!rx_ready || rbuff !== rsent[i]) begin
            failures++; $display("FAIL rx %h ready=%b exp %h", rbuff, rx_ready, rsent[i]);
          end
          @(negedge clk); rx_ack = 1; @(negedge clk); rx_ack = 0;
          checks++; if (rx_ready) begin failures++; $display("FAIL rx_ready not cleared"); end
          n_rx++;
        end
        // framing error: stop bit 0 must not deliver a byte
        drive_frame(8'hA5, 1'b0);
        repeat (2 * BIT) @(posedge clk);
        checks++; if (rx_ready) begin failures++; $display("FAIL framing error accepted"); end
      end
    join
    repeat (BIT) @(posedge clk);
    checks++; if (n_dec != 16) begin failures++; $display("FAIL decoded %0d frames", n_dec); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
