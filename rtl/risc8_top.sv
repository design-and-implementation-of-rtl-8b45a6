// risc8_top: pipelined 8-bit Harvard RISC processor with I/O ports, UART and
// interrupts.
//
// The core executes 16-bit MIPS-like instructions out of a 262,144-word instruction
// memory and works on eight DATA_W-bit registers (R0 reads as zero) and a 4096-word
// data memory. Two stages overlap: while the instruction in IRX executes (register
// read, ALU, memory access and write-back all in one cycle), the next one is fetched
// into IR, so straight-line code retires one instruction per clock. A taken branch,
// jump, return or interrupt entry inserts two bubble cycles (see tstate_counter).
// Because results are written at the end of the execute cycle and read in the next
// one, there are no data hazards and no forwarding paths.
// Every ALU result also goes to the accumulator, which feeds the output port and the
// UART transmitter and receives the input port and the UART receiver. The flag
// register (Z, C, B, P) is updated by ALU instructions (Z and P also by the
// accumulator's own operations) and read with the status word
//   {Z, C, B, P, TMF0, in_isr, tx_busy, rx_ready}.
// The clock unit divides clk_src by CLK_DIV to the core clock clk_core (25 MHz from
// the 50 MHz board clock) and provides the UART's baud tick and the clock enables of
// the register set and data memory.
// Loading: while rst_n is low and clk_src runs, the host writes the instruction
// memory (ld_im_we) and the data memory (ld_dm_we) at ld_addr, synchronously to
// clk_core. After reset the core starts at address 0.
// Debug outputs show the instruction in the execute stage and pipeline events. The
// internal registers IR, PC, PCR, PCS, STACKPC, INTCON and TIMER are kept as named
// signals for waveform viewing and are otherwise unused at this level.
// The architecture follows the processor description; module headers say which
// details are this design's choices.
module risc8_top
  import risc_pkg::*;
#(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned IM_AW      = 18,
  parameter int unsigned DM_AW      = 12,
  parameter int unsigned CLK_DIV    = 2,
  parameter int unsigned CORE_HZ    = 25_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned OVERSAMPLE = 8,
  parameter int unsigned TIMER_W    = 10
) (
  input  logic             clk_src,
  input  logic             rst_n,
  output logic             clk_core,
  // I/O ports
  input  logic [7:0]       in_port,
  output logic [7:0]       out_port,
  // serial
  input  logic             rxin,
  output logic             txout,
  // external interrupts
  input  logic             int0,
  input  logic             int1,
  // memory load port
  input  logic             ld_im_we,
  input  logic             ld_dm_we,
  input  logic [IM_AW-1:0] ld_addr,
  input  logic [15:0]      ld_data,
  // debug
  output logic             dbg_exec,
  output logic [IM_AW-1:0] dbg_pc,
  output logic [15:0]      dbg_instr,
  output logic [DATA_W-1:0] dbg_alu,
  output logic [DATA_W-1:0] dbg_acc,
  output logic [3:0]       dbg_flags,
  output logic             dbg_redirect,
  output logic             dbg_irq_take,
  output logic             dbg_tx2
);

  logic rst, baud_tick, rf_clk_en, dm_clk_en;

  // ---------------- control ----------------
  ctl_t             ctl;
  logic [15:0]      ir, irx, im_rdata;
  logic [IM_AW-1:0] ir_pc, irx_pc, fetch_addr, pc, pcr, pcs, stackpc, link;
  logic             irx_valid, redirect, irq_take, advance, tx2, irq;
  logic [IM_AW-1:0] vector;

  // ---------------- datapath ----------------
  logic [DATA_W-1:0] da, db, alu_b, alu_y, dm_rdata, acc, acc_res, sysbus;
  flags_t            alu_flags, flags;
  logic              acc_z, acc_p;
  logic [7:0]        in_data, rbuff;
  logic              tx_busy, rx_ready, tmf0, in_isr;
  logic [2:0]        intcon;
  logic [TIMER_W-1:0] timer;
  logic [DM_AW-1:0]  dm_addr;
  logic [DATA_W-1:0] dm_wdata;

  clock_unit #(
    .CLK_DIV(CLK_DIV), .CORE_HZ(CORE_HZ), .BAUD(BAUD), .OVERSAMPLE(OVERSAMPLE)
  ) u_clk (
    .clk_src, .rst_n, .clk_core, .rst, .baud_tick,
    .rf_wr(ctl.rf_we), .dm_wr(ctl.dm_we | ld_dm_we),
    .rf_clk_en, .dm_clk_en
  );

  instr_mem #(.AW(IM_AW), .W(16)) u_im (
    .clk(clk_core), .raddr(fetch_addr), .rdata(im_rdata),
    .we(ld_im_we), .waddr(ld_addr), .wdata(ld_data)
  );

  control_unit #(.IM_AW(IM_AW)) u_cu (
    .clk(clk_core), .rst, .fetch_data(im_rdata), .fetch_addr,
    .eq(alu_flags.z), .irq, .ctl, .ir, .ir_pc, .irx, .irx_pc, .irx_valid,
    .redirect, .irq_take, .advance, .tx2
  );

  pc_unit #(.IM_AW(IM_AW), .DATA_W(DATA_W)) u_pc (
    .clk(clk_core), .rst, .advance, .from_pcr(tx2), .redirect, .jump(ctl.jump),
    .irx_pc, .imm7(irx[6:0]), .target13(irx[12:0]), .reg_rs(da),
    .irq_take, .vector, .ret_pc(ir_pc),
    .fetch_addr, .pc, .pcr, .pcs, .stackpc, .link
  );

  regfile #(.DATA_W(DATA_W), .NREG(8)) u_rf (
    .clk(clk_core), .rst, .clk_en(rf_clk_en), .we(ctl.rf_we), .wa(ctl.rf_wa),
    .wd(sysbus), .ra(irx[12:10]), .rb(irx[9:7]), .da, .db
  );

  assign alu_b = ctl.alu_b_imm ? DATA_W'(irx[6:0]) : db;

  alu #(.DATA_W(DATA_W)) u_alu (.a(da), .b(alu_b), .op(ctl.alu_op), .y(alu_y), .flags(alu_flags));

  always_ff @(posedge clk_core) begin
    if (rst) flags <= '0;
    else if (ctl.flags_we) flags <= alu_flags;
    else if (ctl.acc_op != ACC_NONE) begin
      flags.z <= acc_z;
      flags.p <= acc_p;
    end
  end

  accumulator #(.DATA_W(DATA_W)) u_acc (
    .clk(clk_core), .rst, .load(ctl.acc_load), .din(sysbus), .op(ctl.acc_op),
    .acc, .result(acc_res), .z(acc_z), .p(acc_p)
  );

  assign dm_addr  = ld_dm_we ? ld_addr[DM_AW-1:0] : DM_AW'(alu_y);
  assign dm_wdata = ld_dm_we ? ld_data[DATA_W-1:0] : db;

  data_mem #(.AW(DM_AW), .W(DATA_W)) u_dm (
    .clk(clk_core), .clk_en(dm_clk_en), .we(ctl.dm_we | ld_dm_we),
    .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata)
  );

  io_ports #(.W(8)) u_io (
    .clk(clk_core), .rst, .pin(in_port), .in_data, .out_we(ctl.out_we),
    .acc(acc[7:0]), .pout(out_port)
  );

  serial_module #(.OVERSAMPLE(OVERSAMPLE)) u_uart (
    .clk(clk_core), .rst, .baud_tick, .tx_start(ctl.tx_start), .tx_data(acc[7:0]),
    .tx_busy, .txout, .rxin, .rx_ack(ctl.rx_ack), .rbuff, .rx_ready
  );

  interrupt_module #(.TIMER_W(TIMER_W), .IM_AW(IM_AW)) u_int (
    .clk(clk_core), .rst, .int0, .int1, .intcon_we(ctl.intcon_we), .intcon_wd(da[2:0]),
    .clr_tmrf(ctl.clr_tmrf), .take(irq_take), .reti(redirect && ctl.jump == JMP_RETI),
    .irq, .vector, .intcon, .tmf0, .in_isr, .timer
  );

  // System data bus: the write-back value.
  always_comb begin
    unique case (ctl.wb_sel)
      WB_MEM:    sysbus = dm_rdata;
      WB_ACC:    sysbus = acc_res;
      WB_INPORT: sysbus = DATA_W'(in_data);
      WB_RBUFF:  sysbus = DATA_W'(rbuff);
      WB_STATUS: sysbus = DATA_W'({flags, tmf0, in_isr, tx_busy, rx_ready});
      WB_LINK:   sysbus = DATA_W'(link);
      default:   sysbus = alu_y;
    endcase
  end

  assign dbg_exec     = irx_valid;
  assign dbg_pc       = irx_pc;
  assign dbg_instr    = irx;
  assign dbg_alu      = alu_y;
  assign dbg_acc      = acc;
  assign dbg_flags    = flags;
  assign dbg_redirect = redirect;
  assign dbg_irq_take = irq_take;
  assign dbg_tx2      = tx2;

endmodule
