// interrupt_module: three prioritised, vectored interrupts and the interval timer.
//
// Sources, highest priority first:
//   I0    external pin int0, not maskable;
//   timer TMF0, set when the 10-bit TIMER register reaches its maximum (1023), taken
//         when INTCON[2] is 1; CLRTMRF (clr_tmrf) clears TMF0;
//   I1    external pin int1, taken when INTCON[1] (external interrupts enabled) is 1
//         and INTCON[0] (I1 mask) is 0.
// The external pins are synchronised with two flops and a rising edge sets the
// source's pending bit. irq is high when a source is pending and enabled and no
// service routine is running; vector is the start address of the highest one. When
// the control unit accepts the request (take) that pending bit is cleared and in_isr
// is set until the return-from-interrupt instruction (reti); requests arriving
// meanwhile wait. TIMER counts every core clock and wraps. INTCON resets to 0.
// Priorities, INTCON bits, timer width and TMF0/CLRTMRF follow the processor
// description; the vector addresses, edge triggering and the no-nesting rule are
// this design's choices.
module interrupt_module #(
  parameter int unsigned   TIMER_W = 10,
  parameter int unsigned   IM_AW   = 18,
  parameter logic [IM_AW-1:0] VEC_I0  = IM_AW'('h10),
  parameter logic [IM_AW-1:0] VEC_TMR = IM_AW'('h20),
  parameter logic [IM_AW-1:0] VEC_I1  = IM_AW'('h30)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             int0,
  input  logic             int1,
  input  logic             intcon_we,
  input  logic [2:0]       intcon_wd,
  input  logic             clr_tmrf,
  input  logic             take,
  input  logic             reti,
  output logic             irq,
  output logic [IM_AW-1:0] vector,
  output logic [2:0]       intcon,
  output logic             tmf0,
  output logic             in_isr,
  output logic [TIMER_W-1:0] timer
);

  logic [1:0] s0, s1;           // synchronisers, [1] is the older sample
  logic       last0, last1;
  logic       pend0, pend1;
  logic       req0, req_t, req1;

  assign req0  = pend0;
  assign req_t = tmf0 & intcon[2];
  assign req1  = pend1 & intcon[1] & ~intcon[0];
  assign irq   = ~in_isr & (req0 | req_t | req1);

  always_comb begin
    if (req0)       vector = VEC_I0;
    else if (req_t) vector = VEC_TMR;
    else            vector = VEC_I1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s0 <= '0; s1 <= '0; last0 <= 1'b0; last1 <= 1'b0;
      pend0 <= 1'b0; pend1 <= 1'b0;
      intcon <= '0; tmf0 <= 1'b0; in_isr <= 1'b0; timer <= '0;
    end else begin
      s0 <= {s0[0], int0};
      s1 <= {s1[0], int1};
      last0 <= s0[1];
      last1 <= s1[1];

      timer <= timer + 1'b1;
      if (clr_tmrf) tmf0 <= 1'b0;
      if (timer == '1) tmf0 <= 1'b1;

      if (intcon_we) intcon <= intcon_wd;

      if (take && irq) begin
        in_isr <= 1'b1;
        if (req0)        pend0 <= 1'b0;
        else if (!req_t) pend1 <= 1'b0;
      end else if (reti) begin
        in_isr <= 1'b0;
      end
      if (s0[1] && !last0) pend0 <= 1'b1;
      if (s1[1] && !last1) pend1 <= 1'b1;
    end
  end

  // The control unit accepts only a request that is being made, and no service
  // routine is entered while another one runs.
  a_take_needs_irq: assert property (@(posedge clk) disable iff (rst) take |-> irq);
  a_no_nesting: assert property (@(posedge clk) disable iff (rst) take |-> !in_isr);

endmodule
