// const_rom: the 21-word, 16-bit constant ROM (ROM_CTRL) of the processor.
//
// A 5-bit address from the microinstruction selects a word, which appears on
// the output combinationally, in the same cycle, so a constant can be put on
// a bus by the instruction that names it. Size and address width are the
// design's. Its contents are this design's: the constants the
// microprogram needs (0, 1, the largest distance, the last removal-curve
// index, and the result, segment, removal, curve, gap and count addresses of
// the RAM layout); the remaining 6 words are 0.
// Addresses 21..31 read as 0.
module const_rom
  import edm_pkg::*;
#(
  parameter int unsigned WORDS = ROM_WORDS
) (
  input  logic [ROM_AW-1:0] addr,
  output logic [DW-1:0]     data
);
  always_comb begin
    data = '0;
    if (32'(addr) < WORDS) begin
      unique case (addr)
        K_ZERO:  data = 16'd0;
        K_ONE:   data = 16'd1;
        K_MAX:   data = 16'hFFFF;
        K_RES1:  data = 16'(RES1_BASE);
        K_RES2:  data = 16'(RES2_BASE);
        K_CNT1:  data = 16'(CNT1_ADDR);
        K_CNT2:  data = 16'(CNT2_ADDR);
        K_SEG1:  data = 16'(SEG1_BASE);
        K_SEG2:  data = 16'(SEG2_BASE);
        K_GAP:   data = 16'(GAP_ADDR);
        K_REM1:  data = 16'(REM1_BASE);
        K_REM2:  data = 16'(REM2_BASE);
        K_CUR1:  data = 16'(CUR1_BASE);
        K_CUR2:  data = 16'(CUR2_BASE);
        K_CLMP:  data = 16'(CURVE_LEN - 1);
        default: data = '0;
      endcase
    end
  end
endmodule
