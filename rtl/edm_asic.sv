// edm_asic: single-processor ASIC for die-sinking spark-erosion simulation.
//
// One microcoded datapath: ALU_1, ALU_2, MULT, ACU, the constant ROM and two
// data RAMs, joined by BUS_1 and BUS_2 (16 bit) and BUS_3 (32 bit), all set
// every cycle by one 112-bit word from the controller. BUS_3 carries the
// multiplier product; the ALUs take it in Q15 form (bits 30:15). This is the
// two-ALU, one-multiplier, on-chip-RAM configuration of the design.
//
// Use: while `busy` is low the host loads the workpiece contour into RAM_1
// and the tool contour into RAM_2 through the host port (`h_sel` picks the
// RAM, reads return on `h_rdata` one cycle later): x,y pairs of unsigned Q15
// coordinates (0..32767) at words 0..2N-1, the point count N (at least 1) in
// the last word (RAM_1: word 1237, N <= 192; RAM_2: word 1029, N <= 151) and
// the electrode's 272-word removal curve at CUR (RAM_1: 960, RAM_2: 755).
// A one-cycle `start` runs the microprogram; `done` pulses when it halts.
// With d2(p,q) = floor(dx^2 / 2^15) + floor(dy^2 / 2^15) the RAMs then hold:
//   RES+i  min over the opposite contour of d2(p_i, q)
//          (RAM_1: 384+i, RAM_2: 302+i)
//   SEG+i  d2(p_i, p_i+1), i < N-1 (RAM_1: 576+i, RAM_2: 453+i)
//   REM+i  CUR[min(RES+i, 271)] (RAM_1: 768+i, RAM_2: 604+i)
//   1236   (RAM_1) the gap: the smallest RES value of the workpiece.
// A run takes 50 + 20(M+N) + 28MN + 2U + 14(M+N-2) + 7M + 2G cycles of
// `busy`, U and G being the number of times the running minimum is replaced
// in the nearest-point search and in the gap search.
// The unit set, sizes and bus widths follow the design; the host port, the
// data layout and the microprogram are this design's own.
module edm_asic
  import edm_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [PC_W-1:0] pc,      // microprogram counter, for observation
  input  logic          h_en,
  input  logic          h_sel,     // 0: RAM_1 (workpiece), 1: RAM_2 (tool)
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  logic [DW-1:0] h_wdata,
  output logic [DW-1:0] h_rdata
);
  mc_t             mc;
  flags_t          f1, f2;
  logic [DW-1:0]   bus1, bus2;
  logic [PW-1:0]   bus3;
  logic [DW-1:0]   alu1_q, alu2_q, ram1_q, ram2_q, rom_q, acu_q, mul_q15;
  logic            h_sel_q;
  logic            ext_en;

  assign ext_en = h_en && !busy;

  controller u_ctrl (
    .clk, .rst_n, .start, .alu1_flags(f1), .alu2_flags(f2),
    .mc, .pc, .busy, .done);

  bus_mux u_bus1 (.sel(mc.bus1), .alu1(alu1_q), .alu2(alu2_q), .ram1(ram1_q),
                  .ram2(ram2_q), .rom(rom_q), .acu(acu_q), .mulh(mul_q15),
                  .bus(bus1));
  bus_mux u_bus2 (.sel(mc.bus2), .alu1(alu1_q), .alu2(alu2_q), .ram1(ram1_q),
                  .ram2(ram2_q), .rom(rom_q), .acu(acu_q), .mulh(mul_q15),
                  .bus(bus2));

  alu #(.NX(ALU1_NX), .NY(ALU1_NY)) u_alu1 (
    .clk, .rst_n, .op(mc.a1_op),
    .wx_we(mc.a1_wx_we), .wx_ad(mc.a1_wx_ad), .wx_sel(mc.a1_wx_sel),
    .wy_we(mc.a1_wy_we), .wy_ad(mc.a1_wy_ad), .wy_sel(mc.a1_wy_sel),
    .rx(mc.a1_rx), .ry(mc.a1_ry), .x_bus(bus1), .y_bus(bus2), .q_bus(mul_q15),
    .out(alu1_q), .flags(f1));

  alu #(.NX(ALU2_NX), .NY(ALU2_NY)) u_alu2 (
    .clk, .rst_n, .op(mc.a2_op),
    .wx_we(mc.a2_wx_we), .wx_ad(mc.a2_wx_ad), .wx_sel(mc.a2_wx_sel),
    .wy_we(mc.a2_wy_we), .wy_ad(mc.a2_wy_ad), .wy_sel(mc.a2_wy_sel),
    .rx(mc.a2_rx), .ry(mc.a2_ry), .x_bus(bus1), .y_bus(bus2), .q_bus(mul_q15),
    .out(alu2_q), .flags(f2));

  mult #(.NX(MULT_NX), .NY(MULT_NY)) u_mult (
    .clk, .rst_n,
    .wx_we(mc.m_wx_we), .wx_ad(mc.m_wx_ad), .wx_sel(mc.m_wx_sel),
    .wy_we(mc.m_wy_we), .wy_ad(mc.m_wy_ad), .wy_sel(mc.m_wy_sel),
    .rx(mc.m_rx), .ry(mc.m_ry), .bus1, .bus2, .prod(bus3));

  // Units that take BUS_3 into a 16-bit register read it in Q15 form.
  assign mul_q15 = bus3[30:15];

  acu #(.NA(ACU_NA), .NB(ACU_NB)) u_acu (
    .clk, .rst_n, .op(mc.c_op),
    .wa_we(mc.c_wa_we), .wa_ad(mc.c_wa_ad), .wa_sel(mc.c_wa_sel),
    .wb_we(mc.c_wb_we), .wb_ad(mc.c_wb_ad), .wb_sel(mc.c_wb_sel),
    .ra(mc.c_ra), .rb(mc.c_rb), .bus1, .bus2, .out(acu_q));

  const_rom u_rom (.addr(mc.rom_ad), .data(rom_q));

  ram_exu #(.WORDS(RAM1_WORDS), .NA(RAM1_NA), .ND(RAM1_ND)) u_ram1 (
    .clk, .rst_n, .we(mc.r1_we),
    .wa_we(mc.r1_wa_we), .wa_ad(mc.r1_wa_ad), .wa_sel(mc.r1_wa_sel),
    .wd_we(mc.r1_wd_we), .wd_ad(mc.r1_wd_ad), .wd_sel(mc.r1_wd_sel),
    .ra(mc.r1_ra), .rd(mc.r1_rd), .bus1, .bus2,
    .ext_en(ext_en && !h_sel), .ext_we(h_we), .ext_addr(h_addr),
    .ext_wdata(h_wdata), .rdata(ram1_q));

  ram_exu #(.WORDS(RAM2_WORDS), .NA(RAM2_NA), .ND(RAM2_ND)) u_ram2 (
    .clk, .rst_n, .we(mc.r2_we),
    .wa_we(mc.r2_wa_we), .wa_ad(mc.r2_wa_ad), .wa_sel(mc.r2_wa_sel),
    .wd_we(mc.r2_wd_we), .wd_ad(mc.r2_wd_ad), .wd_sel(mc.r2_wd_sel),
    .ra(mc.r2_ra), .rd(mc.r2_rd), .bus1, .bus2,
    .ext_en(ext_en && h_sel), .ext_we(h_we), .ext_addr(h_addr),
    .ext_wdata(h_wdata), .rdata(ram2_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_sel_q <= 1'b0;
    else        h_sel_q <= h_sel;
  end
  assign h_rdata = h_sel_q ? ram2_q : ram1_q;

  // The host may not write a RAM while the program runs.
  a_no_host_write_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(busy && h_en && h_we));
endmodule
