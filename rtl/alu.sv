// alu: 16-bit arithmetic/logic execution unit (ALU_1 and ALU_2 of the processor).
//
// Two input register files, X with NX and Y with NY registers, are loaded from
// the buses; each cycle the microinstruction selects one register of each and
// an operation. The result goes into the output register, which drives the
// buses in the following cycle, and the flags (zero, negative, carry/borrow)
// into a flag register that the controller may branch on. ALU_NOP holds both.
// A register file write port chooses between two sources: `x_bus`/`y_bus`
// (sel 0) or the Q15-scaled product on the 32-bit bus (sel 1).
//
// The word length and register-file sizes (ALU_1: 11 and 6, ALU_2: 9 and 7)
// are the design's; the operation set and flag definitions are this design's
// own choice, the smallest set the simulation microprogram needs.
// Timing: one operation per cycle, result visible one cycle after issue.
module alu
  import edm_pkg::*;
#(
  parameter int unsigned NX = 11,
  parameter int unsigned NY = 6,
  parameter int unsigned XAW = rfaw(NX),
  parameter int unsigned YAW = rfaw(NY)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  alu_op_e        op,
  input  logic           wx_we,
  input  logic [XAW-1:0] wx_ad,
  input  logic           wx_sel,
  input  logic           wy_we,
  input  logic [YAW-1:0] wy_ad,
  input  logic           wy_sel,
  input  logic [XAW-1:0] rx,
  input  logic [YAW-1:0] ry,
  input  logic [DW-1:0]  x_bus,
  input  logic [DW-1:0]  y_bus,
  input  logic [DW-1:0]  q_bus,
  output logic [DW-1:0]  out,
  output flags_t         flags
);
  logic [DW-1:0] xv, yv, res;
  logic          cy;

  regfile #(.N(NX), .W(DW), .AW(XAW)) u_rx (
    .clk, .rst_n, .we(wx_we), .waddr(wx_ad),
    .wdata(wx_sel ? q_bus : x_bus), .raddr(rx), .rdata(xv));
  regfile #(.N(NY), .W(DW), .AW(YAW)) u_ry (
    .clk, .rst_n, .we(wy_we), .waddr(wy_ad),
    .wdata(wy_sel ? q_bus : y_bus), .raddr(ry), .rdata(yv));

  always_comb begin
    cy  = 1'b0;
    res = out;
    unique case (op)
      ALU_NOP:  res = out;
      ALU_ADD:  {cy, res} = {1'b0, xv} + {1'b0, yv};
      ALU_SUB:  {cy, res} = {1'b0, xv} - {1'b0, yv};
      ALU_PASX: res = xv;
      ALU_PASY: res = yv;
      ALU_AND:  res = xv & yv;
      ALU_OR:   res = xv | yv;
      ALU_XOR:  res = xv ^ yv;
      default:  res = out;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out   <= '0;
      flags <= '0;
    end else if (op != ALU_NOP) begin
      out   <= res;
      flags <= '{z: (res == '0), n: res[DW-1], c: cy};
    end
  end
endmodule
