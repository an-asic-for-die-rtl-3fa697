// acu: address computation unit (ACU) with 12-bit addresses and 16-bit data.
//
// Register file A (7 pointers) and register file B (3 steps/offsets), sizes as
// in the design's architecture summary, are loaded from the low 12 bits of
// BUS_1 (sel 0) or BUS_2 (sel 1). Operations: PASS (out <= A[ra]), ADD
// (out <= A[ra] + B[rb]) and PINC, post-increment (out <= A[ra] and
// A[ra] <= A[ra] + B[rb]), all modulo 2^12. The output register holds the
// address; it drives the 16-bit buses zero-extended in the next cycle, from
// where the RAMs load it into their address registers. A bus write to the
// same A register in the same cycle wins over the post-increment.
// The operation set is this design's own choice.
module acu
  import edm_pkg::*;
#(
  parameter int unsigned NA = 7,
  parameter int unsigned NB = 3,
  parameter int unsigned AAW = rfaw(NA),
  parameter int unsigned BAW = rfaw(NB)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  acu_op_e        op,
  input  logic           wa_we,
  input  logic [AAW-1:0] wa_ad,
  input  logic           wa_sel,
  input  logic           wb_we,
  input  logic [BAW-1:0] wb_ad,
  input  logic           wb_sel,
  input  logic [AAW-1:0] ra,
  input  logic [BAW-1:0] rb,
  input  logic [DW-1:0]  bus1,
  input  logic [DW-1:0]  bus2,
  output logic [DW-1:0]  out
);
  logic [AW-1:0] av, bv, sum, addr_q;
  logic          a_we;
  logic [AAW-1:0] a_wad;
  logic [AW-1:0] a_wd;

  assign sum = av + bv;

  // Write port of A: a bus write, else the post-increment write-back.
  always_comb begin
    a_we  = wa_we;
    a_wad = wa_ad;
    a_wd  = wa_sel ? bus2[AW-1:0] : bus1[AW-1:0];
    if (!wa_we && op == ACU_PINC) begin
      a_we  = 1'b1;
      a_wad = ra;
      a_wd  = sum;
    end
  end

  regfile #(.N(NA), .W(AW), .AW(AAW)) u_ra (
    .clk, .rst_n, .we(a_we), .waddr(a_wad), .wdata(a_wd),
    .raddr(ra), .rdata(av));
  regfile #(.N(NB), .W(AW), .AW(BAW)) u_rb (
    .clk, .rst_n, .we(wb_we), .waddr(wb_ad),
    .wdata(wb_sel ? bus2[AW-1:0] : bus1[AW-1:0]), .raddr(rb), .rdata(bv));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr_q <= '0;
    else begin
      unique case (op)
        ACU_NOP:  addr_q <= addr_q;
        ACU_PASS: addr_q <= av;
        ACU_ADD:  addr_q <= sum;
        ACU_PINC: addr_q <= av;
        default:  addr_q <= addr_q;
      endcase
    end
  end

  assign out = DW'(addr_q);
endmodule
