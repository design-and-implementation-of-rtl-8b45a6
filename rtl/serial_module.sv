// serial_module: full-duplex UART of the RISC processor (115200 baud, 8N1).
//
// Transmit: a send (tx_start while not busy) copies the accumulator into TBUFF; the
// frame is a start bit 0, the eight data bits least significant first (TBUFF shifts
// right after each bit) and a stop bit 1. A send while busy is ignored.
// Receive: rxin is synchronised; a low level starts a frame, the start bit is checked
// near its middle, then each data bit is sampled once per bit period into a shift
// register. If the stop bit reads 1 the byte moves to RBUFF and rx_ready rises; rx_ack
// (the RECV instruction) clears rx_ready. A new byte overwrites RBUFF.
// Timing comes from baud_tick, a one-cycle enable at OVERSAMPLE times the baud rate
// supplied by the clock unit. Frame format and baud rate follow the processor
// description; the oversampling, framing check and overrun behaviour are this
// design's choices.
module serial_module #(
  parameter int unsigned OVERSAMPLE = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       baud_tick,
  // transmitter
  input  logic       tx_start,
  input  logic [7:0] tx_data,
  output logic       tx_busy,
  output logic       txout,
  // receiver
  input  logic       rxin,
  input  logic       rx_ack,
  output logic [7:0] rbuff,
  output logic       rx_ready
);

  localparam int unsigned CW = $clog2(OVERSAMPLE) + 1;

  // ---------------- transmitter ----------------
  logic [7:0]    tbuff;
  logic [3:0]    tx_bit;   // 0 start, 1..8 data, 9 stop
  logic [CW-1:0] tx_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      tbuff   <= '0;
      tx_bit  <= '0;
      tx_cnt  <= '0;
      tx_busy <= 1'b0;
    end else if (!tx_busy) begin
      if (tx_start) begin
        tbuff   <= tx_data;
        tx_bit  <= '0;
        tx_cnt  <= '0;
        tx_busy <= 1'b1;
      end
    end else if (baud_tick) begin
      if (tx_cnt == CW'(OVERSAMPLE - 1)) begin
        tx_cnt <= '0;
        if (tx_bit >= 4'd1 && tx_bit <= 4'd8) tbuff <= {1'b0, tbuff[7:1]};
        if (tx_bit == 4'd9) tx_busy <= 1'b0;
        else                tx_bit  <= tx_bit + 4'd1;
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end

  // The line idles high between frames and every frame ends with a stop bit.
  a_idle_high: assert property (@(posedge clk) disable iff (rst) !tx_busy |-> txout);
  a_stop_bit: assert property (@(posedge clk) disable iff (rst) (tx_busy && tx_bit == 4'd9) |-> txout);

  always_comb begin
    if (!tx_busy)            txout = 1'b1;
    else if (tx_bit == 4'd0) txout = 1'b0;
    else if (tx_bit == 4'd9) txout = 1'b1;
    else                     txout = tbuff[0];
  end

  // ---------------- receiver ----------------
  logic          rx_m, rx_s;
  logic          rx_busy;
  logic [3:0]    rx_bit;   // 0 start, 1..8 data, 9 stop
  logic [CW-1:0] rx_cnt;
  logic [7:0]    rx_sh;
  logic          rx_sample;

  assign rx_sample = (rx_bit == 4'd0) ? (rx_cnt == CW'(OVERSAMPLE/2 - 2))
                                      : (rx_cnt == CW'(OVERSAMPLE - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_m     <= 1'b1;
      rx_s     <= 1'b1;
      rx_busy  <= 1'b0;
      rx_bit   <= '0;
      rx_cnt   <= '0;
      rx_sh    <= '0;
      rbuff    <= '0;
      rx_ready <= 1'b0;
    end else begin
      rx_m <= rxin;
      rx_s <= rx_m;
      if (rx_ack) rx_ready <= 1'b0;
      if (!rx_busy) begin
        if (baud_tick && !rx_s) begin
          rx_busy <= 1'b1;
          rx_bit  <= '0;
          rx_cnt  <= '0;
        end
      end else if (baud_tick) begin
        if (rx_sample) begin
          rx_cnt <= '0;
          if (rx_bit == 4'd0) begin
            if (rx_s) rx_busy <= 1'b0;     // glitch, not a start bit
            else      rx_bit  <= 4'd1;
          end else if (rx_bit <= 4'd8) begin
            rx_sh  <= {rx_s, rx_sh[7:1]};
            rx_bit <= rx_bit + 4'd1;
          end else begin
            rx_busy <= 1'b0;
            if (rx_s) begin
              rbuff    <= rx_sh;
              rx_ready <= 1'b1;
            end
          end
        end else begin
          rx_cnt <= rx_cnt + 1'b1;
        end
      end
    end
  end

endmodule
