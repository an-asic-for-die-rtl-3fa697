// bus_mux: one 16-bit bus of the processor (BUS_1 or BUS_2).
//
// A bus is modelled as a multiplexer: the microinstruction names the one
// execution-unit output that drives it in a cycle (ALU_1, ALU_2, RAM_1,
// RAM_2, ROM, ACU or the Q15 product); SRC_NONE leaves the bus at zero.
// The bus is combinational: a value put on it is written into register files
// at the end of the same cycle. Two such buses and the 32-bit product bus are
// the design's; the source set and the zero-when-idle rule are this design's.
module bus_mux
  import edm_pkg::*;
(
  input  bus_src_e      sel,
  input  logic [DW-1:0] alu1,
  input  logic [DW-1:0] alu2,
  input  logic [DW-1:0] ram1,
  input  logic [DW-1:0] ram2,
  input  logic [DW-1:0] rom,
  input  logic [DW-1:0] acu,
  input  logic [DW-1:0] mulh,
  output logic [DW-1:0] bus
);
  always_comb begin
    unique case (sel)
      SRC_NONE: bus = '0;
      SRC_ALU1: bus = alu1;
      SRC_ALU2: bus = alu2;
      SRC_RAM1: bus = ram1;
      SRC_RAM2: bus = ram2;
      SRC_ROM:  bus = rom;
      SRC_ACU:  bus = acu;
      SRC_MULH: bus = mulh;
      default:  bus = '0;
    endcase
  end
endmodule
