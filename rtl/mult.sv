// mult: signed 16 x 16 -> 32-bit hardware multiplier execution unit (MULT).
//
// Two input register files (X: 2 registers, Y: 4 registers, as in the
// design's architecture summary) are loaded from BUS_1 (sel 0) or BUS_2
// (sel 1). Every cycle the product register loads X[rx] * Y[ry] as a signed
// two's-complement product; it drives the 32-bit bus BUS_3 in the next cycle.
// Signed operands and the always-multiply timing are this design's choice.
module mult
  import edm_pkg::*;
#(
  parameter int unsigned NX = 2,
  parameter int unsigned NY = 4,
  parameter int unsigned XAW = rfaw(NX),
  parameter int unsigned YAW = rfaw(NY)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wx_we,
  input  logic [XAW-1:0] wx_ad,
  input  logic           wx_sel,
  input  logic           wy_we,
  input  logic [YAW-1:0] wy_ad,
  input  logic           wy_sel,
  input  logic [XAW-1:0] rx,
  input  logic [YAW-1:0] ry,
  input  logic [DW-1:0]  bus1,
  input  logic [DW-1:0]  bus2,
  output logic [PW-1:0]  prod
);
  logic [DW-1:0] xv, yv;

  regfile #(.N(NX), .W(DW), .AW(XAW)) u_rx (
    .clk, .rst_n, .we(wx_we), .waddr(wx_ad),
    .wdata(wx_sel ? bus2 : bus1), .raddr(rx), .rdata(xv));
  regfile #(.N(NY), .W(DW), .AW(YAW)) u_ry (
    .clk, .rst_n, .we(wy_we), .waddr(wy_ad),
    .wdata(wy_sel ? bus2 : bus1), .raddr(ry), .rdata(yv));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prod <= '0;
    else        prod <= PW'($signed(xv) * $signed(yv));
  end
endmodule
