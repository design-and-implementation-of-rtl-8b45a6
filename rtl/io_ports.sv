// io_ports: the processor's 8-bit input port and 8-bit output port.
//
// The input pins pass through a two-flop synchroniser; in_data is what an IN
// instruction copies into the accumulator. The output port is a register loaded from
// the accumulator when out_we is high at a rising edge and holds its value otherwise;
// it clears on reset. Port widths follow the processor description; the synchroniser
// and the reset value are this design's choices. in_data lags the pins by two cycles.
module io_ports #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] pin,
  output logic [W-1:0] in_data,
  input  logic         out_we,
  input  logic [W-1:0] acc,
  output logic [W-1:0] pout
);

  logic [W-1:0] sync1;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1   <= '0;
      in_data <= '0;
      pout    <= '0;
    end else begin
      sync1   <= pin;
      in_data <= sync1;
      if (out_we) pout <= acc;
    end
  end

endmodule
