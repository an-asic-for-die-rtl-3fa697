// microcode_rom: the 163 x 112-bit instruction ROM of the controller.
//
// Holds the microprogram of the processor, read combinationally by the
// program counter. The program is this design's own (the source design's
// microcode is not available). It performs the distance computations of one
// simulation cycle that the design describes: for every point of each
// contour the squared distance to the nearest point of the opposite contour
// (workpiece removal and tool wear), the squared distance between successive
// points of each contour (shape regeneration), the smallest
// electrode-to-electrode distance (servo feed), and for every point the local
// removal read from the electrode's measured removal curve at that distance.
//
//   words   0..31   pass 0: workpiece points (RAM_1) against the tool (RAM_2)
//   words  32..63   pass 1: tool points against the workpiece
//   words  64..85   segment lengths of the workpiece contour
//   words  86..107  segment lengths of the tool contour
//   words 108..123  gap: minimum of the workpiece results
//   words 124..141  removal look-up, workpiece: REM+i <= CURVE[min(RES+i, 271)]
//   words 142..159  removal look-up, tool
//   word  160       halt; words 161..162 are empty (all-zero = no operation)
//
// A nearest-distance pass: a prologue (pointers, step 1, result base, the two
// point counts, 7 words); per own point: best <= FFFF and load (xo, yo)
// (5 words); per opposite point: load (xp, yp), dx and dy on the ALUs, dx^2
// and dy^2 on the multiplier, d2 = dx^2 + dy^2 in Q15 unsigned, compare with
// best, branch over the two-word update (14 or 16 cycles); store best at
// RES+i and loop (4 words). A segment section walks the contour keeping the
// previous point in the ALUs, 14 cycles per segment. A removal section reads
// RES+i, compares it with 271 on ALU_1 and forms the curve address on the
// ACU (curve base in B1 plus the distance in A4, or the clamp value 271 in
// A5), 11 cycles per point.
// Register use in a pass: ACU A0 own pointer, A1 opposite pointer, A2 result
// pointer, B0 = 1. ALU_1 X0 xo, X1 best, X2 dx^2, Y0 xp, Y1 dy^2, Y2 d2.
// ALU_2 X0 yo, X1 own points left, X2 opposite points left, X3 opposite
// count, Y0 yp, Y1 = 1.
module microcode_rom
  import edm_pkg::*;
(
  input  logic [PC_W-1:0] addr,
  output mc_t             word
);
  // The own-contour RAM of a pass is RAM_1 in pass 0 and RAM_2 in pass 1.
  function automatic mc_t ram_wa(mc_t m, bit ram2, logic sel);
    if (!ram2) begin m.r1_wa_we = 1'b1; m.r1_wa_ad = 1'b0; m.r1_wa_sel = sel; end
    else       begin m.r2_wa_we = 1'b1; m.r2_wa_ad = 1'b0; m.r2_wa_sel = sel; end
    return m;
  endfunction

  function automatic mc_t pass_word(int unsigned off, bit dir, int unsigned base);
    mc_t      m;
    bus_src_e own, opp;
    m   = '0;
    own = dir ? SRC_RAM2 : SRC_RAM1;
    opp = dir ? SRC_RAM1 : SRC_RAM2;
    case (off)
      // ---- prologue
      0: begin m.bus1 = SRC_ROM; m.rom_ad = K_ZERO;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd0; m.c_wa_sel = SEL_A; end
      1: begin m.bus1 = SRC_ROM; m.bus2 = SRC_ROM; m.rom_ad = K_ONE;
               m.c_wb_we = 1'b1; m.c_wb_ad = 2'd0; m.c_wb_sel = SEL_A;
               m.a2_wy_we = 1'b1; m.a2_wy_ad = 3'd1; m.a2_wy_sel = SEL_A; end
      2: begin m.bus1 = SRC_ROM; m.rom_ad = dir ? K_RES2 : K_RES1;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd2; m.c_wa_sel = SEL_A; end
      3: begin m.bus1 = SRC_ROM; m.rom_ad = dir ? K_CNT2 : K_CNT1;
               m = ram_wa(m, dir, SEL_A); end
      4: begin m.bus1 = SRC_ROM; m.rom_ad = dir ? K_CNT1 : K_CNT2;
               m = ram_wa(m, !dir, SEL_A); end
      5: begin m.bus1 = own; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd1; end
      6: begin m.bus1 = opp; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd3; end
      // ---- outer loop
      7: begin m.c_op = ACU_PINC; m.c_ra = 3'd0; m.c_rb = 2'd0;
               m.bus1 = SRC_ROM; m.rom_ad = K_MAX;
               m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd1;
               m.a2_op = ALU_PASX; m.a2_rx = 4'd3; end
      8: begin m.bus2 = SRC_ACU; m = ram_wa(m, dir, SEL_B);
               m.c_op = ACU_PINC; m.c_ra = 3'd0; m.c_rb = 2'd0;
               m.bus1 = SRC_ALU2; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd2; end
      9: begin m.bus2 = SRC_ACU; m = ram_wa(m, dir, SEL_B);
               m.bus1 = SRC_ROM; m.rom_ad = K_ZERO;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd1; m.c_wa_sel = SEL_A; end
      10: begin m.bus1 = own; m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd0; end
      11: begin m.bus1 = own; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd0; end
      // ---- inner loop
      12: begin m.c_op = ACU_PINC; m.c_ra = 3'd1; m.c_rb = 2'd0; end
      13: begin m.bus2 = SRC_ACU; m = ram_wa(m, !dir, SEL_B);
                m.c_op = ACU_PINC; m.c_ra = 3'd1; m.c_rb = 2'd0; end
      14: begin m.bus2 = SRC_ACU; m = ram_wa(m, !dir, SEL_B); end
      15: begin m.bus2 = opp; m.a1_wy_we = 1'b1; m.a1_wy_ad = 3'd0; end
      16: begin m.bus2 = opp; m.a2_wy_we = 1'b1; m.a2_wy_ad = 3'd0;
                m.a1_op = ALU_SUB; m.a1_rx = 4'd0; m.a1_ry = 3'd0; end
      17: begin m.bus1 = SRC_ALU1;
                m.m_wx_we = 1'b1; m.m_wx_ad = 1'b0; m.m_wx_sel = SEL_A;
                m.m_wy_we = 1'b1; m.m_wy_ad = 2'd0; m.m_wy_sel = SEL_A;
                m.a2_op = ALU_SUB; m.a2_rx = 4'd0; m.a2_ry = 3'd0; end
      18: begin m.bus1 = SRC_ALU2;
                m.m_wx_we = 1'b1; m.m_wx_ad = 1'b1; m.m_wx_sel = SEL_A;
                m.m_wy_we = 1'b1; m.m_wy_ad = 2'd1; m.m_wy_sel = SEL_A;
                m.m_rx = 1'b0; m.m_ry = 2'd0; end
      19: begin m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd2; m.a1_wx_sel = SEL_B;
                m.m_rx = 1'b1; m.m_ry = 2'd1; end
      20: begin m.a1_wy_we = 1'b1; m.a1_wy_ad = 3'd1; m.a1_wy_sel = SEL_B; end
      21: begin m.a1_op = ALU_ADD; m.a1_rx = 4'd2; m.a1_ry = 3'd1; end
      22: begin m.bus2 = SRC_ALU1; m.a1_wy_we = 1'b1; m.a1_wy_ad = 3'd2; end
      23: begin m.a1_op = ALU_SUB; m.a1_rx = 4'd1; m.a1_ry = 3'd2;
                m.a2_op = ALU_SUB; m.a2_rx = 4'd2; m.a2_ry = 3'd1; end
      24: begin m.seq_op = SEQ_BRANCH; m.seq_cnd = {1'b0, CND_ALU1_C};
                m.seq_tgt = PC_W'(base + L_JOIN);
                m.bus1 = SRC_ALU2; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd2; end
      25: begin m.a1_op = ALU_PASY; m.a1_ry = 3'd2; end
      26: begin m.bus1 = SRC_ALU1; m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd1; end
      27: begin m.seq_op = SEQ_BRANCH; m.seq_cnd = {1'b1, CND_ALU2_Z};
                m.seq_tgt = PC_W'(base + L_INNER); end
      // ---- store and outer loop-back
      28: begin m.c_op = ACU_PINC; m.c_ra = 3'd2; m.c_rb = 2'd0;
                m.a2_op = ALU_SUB; m.a2_rx = 4'd1; m.a2_ry = 3'd1; end
      29: begin m.bus2 = SRC_ACU; m = ram_wa(m, dir, SEL_B);
                m.a1_op = ALU_PASX; m.a1_rx = 4'd1;
                m.bus1 = SRC_ALU2; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd1; end
      30: begin m.bus1 = SRC_ALU1;
                if (!dir) begin m.r1_wd_we = 1'b1; m.r1_wd_ad = 2'd0; m.r1_wd_sel = SEL_A; end
                else      begin m.r2_wd_we = 1'b1; m.r2_wd_ad = 1'b0; m.r2_wd_sel = SEL_A; end
           end
      31: begin if (!dir) m.r1_we = 1'b1; else m.r2_we = 1'b1;
                m.seq_op = SEQ_BRANCH; m.seq_cnd = {1'b1, CND_ALU2_Z};
                m.seq_tgt = PC_W'(base + L_OUTER); end
      default: m = '0;
    endcase
    return m;
  endfunction

  // Squared segment lengths of the own contour (RAM_1 when ram2 = 0).
  function automatic mc_t seg_word(int unsigned off, bit ram2, int unsigned base);
    mc_t      m;
    bus_src_e own;
    m   = '0;
    own = ram2 ? SRC_RAM2 : SRC_RAM1;
    case (off)
      0: begin m.bus1 = SRC_ROM; m.rom_ad = K_ZERO;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd0; m.c_wa_sel = SEL_A; end
      1: begin m.bus1 = SRC_ROM; m.rom_ad = ram2 ? K_SEG2 : K_SEG1;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd2; m.c_wa_sel = SEL_A; end
      2: begin m.bus1 = SRC_ROM; m.rom_ad = ram2 ? K_CNT2 : K_CNT1;
               m = ram_wa(m, ram2, SEL_A);
               m.c_op = ACU_PINC; m.c_ra = 3'd0; m.c_rb = 2'd0; end
      3: begin m.bus2 = SRC_ACU; m = ram_wa(m, ram2, SEL_B);
               m.c_op = ACU_PINC; m.c_ra = 3'd0; m.c_rb = 2'd0; end
      4: begin m.bus1 = own; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd1;
               m.bus2 = SRC_ACU; m = ram_wa(m, ram2, SEL_B); end
      5: begin m.bus1 = own; m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd0;
               m.a2_op = ALU_SUB; m.a2_rx = 4'd1; m.a2_ry = 3'd1; end
      6: begin m.bus1 = own; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd0; end
      7: begin m.bus1 = SRC_ALU2; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd1;
               m.seq_op = SEQ_BRANCH; m.seq_cnd = {1'b0, CND_ALU2_Z};
               m.seq_tgt = PC_W'(base + SEG_LEN); end
      // ---- per segment: previous point in ALU_1 X0 / ALU_2 X0
      8: begin m.c_op = ACU_PINC; m.c_ra = 3'd0; m.c_rb = 2'd0; end
      9: begin m.bus2 = SRC_ACU; m = ram_wa(m, ram2, SEL_B);
               m.c_op = ACU_PINC; m.c_ra = 3'd0; m.c_rb = 2'd0; end
      10: begin m.bus2 = SRC_ACU; m = ram_wa(m, ram2, SEL_B); end
      11: begin m.bus2 = own; m.a1_wy_we = 1'b1; m.a1_wy_ad = 3'd0; end
      12: begin m.bus2 = own; m.a2_wy_we = 1'b1; m.a2_wy_ad = 3'd0;
                m.a1_op = ALU_SUB; m.a1_rx = 4'd0; m.a1_ry = 3'd0; end
      13: begin m.bus1 = SRC_ALU1;
                m.m_wx_we = 1'b1; m.m_wx_ad = 1'b0; m.m_wx_sel = SEL_A;
                m.m_wy_we = 1'b1; m.m_wy_ad = 2'd0; m.m_wy_sel = SEL_A;
                m.a2_op = ALU_SUB; m.a2_rx = 4'd0; m.a2_ry = 3'd0; end
      14: begin m.bus1 = SRC_ALU2;
                m.m_wx_we = 1'b1; m.m_wx_ad = 1'b1; m.m_wx_sel = SEL_A;
                m.m_wy_we = 1'b1; m.m_wy_ad = 2'd1; m.m_wy_sel = SEL_A;
                m.m_rx = 1'b0; m.m_ry = 2'd0; end
      15: begin m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd2; m.a1_wx_sel = SEL_B;
                m.m_rx = 1'b1; m.m_ry = 2'd1; end
      16: begin m.a1_wy_we = 1'b1; m.a1_wy_ad = 3'd1; m.a1_wy_sel = SEL_B; end
      17: begin m.a1_op = ALU_ADD; m.a1_rx = 4'd2; m.a1_ry = 3'd1;
                m.c_op = ACU_PINC; m.c_ra = 3'd2; m.c_rb = 2'd0; end
      18: begin m.bus1 = SRC_ALU1; m.bus2 = SRC_ACU; m = ram_wa(m, ram2, SEL_B);
                if (!ram2) begin m.r1_wd_we = 1'b1; m.r1_wd_ad = 2'd0; m.r1_wd_sel = SEL_A; end
                else       begin m.r2_wd_we = 1'b1; m.r2_wd_ad = 1'b0; m.r2_wd_sel = SEL_A; end
                m.a1_op = ALU_PASY; m.a1_ry = 3'd0; end
      19: begin if (!ram2) m.r1_we = 1'b1; else m.r2_we = 1'b1;
                m.bus1 = SRC_ALU1; m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd0;
                m.a2_op = ALU_PASY; m.a2_ry = 3'd0; end
      20: begin m.bus1 = SRC_ALU2; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd0;
                m.a2_op = ALU_SUB; m.a2_rx = 4'd1; m.a2_ry = 3'd1; end
      21: begin m.bus1 = SRC_ALU2; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd1;
                m.seq_op = SEQ_BRANCH; m.seq_cnd = {1'b1, CND_ALU2_Z};
                m.seq_tgt = PC_W'(base + LS_LOOP); end
      default: m = '0;
    endcase
    return m;
  endfunction

  // Gap: the smallest nearest-distance of the workpiece points, to GAP_ADDR.
  function automatic mc_t gap_word(int unsigned off, int unsigned base);
    mc_t m;
    m = '0;
    case (off)
      0: begin m.bus1 = SRC_ROM; m.rom_ad = K_RES1;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd2; m.c_wa_sel = SEL_A; end
      1: begin m.bus1 = SRC_ROM; m.rom_ad = K_CNT1; m = ram_wa(m, 1'b0, SEL_A); end
      2: begin m.bus1 = SRC_ROM; m.rom_ad = K_MAX; m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd1; end
      3: begin m.bus1 = SRC_RAM1; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd1; end
      // ---- per workpiece result
      4: begin m.c_op = ACU_PINC; m.c_ra = 3'd2; m.c_rb = 2'd0; end
      5: begin m.bus2 = SRC_ACU; m = ram_wa(m, 1'b0, SEL_B); end
      6: m = '0;
      7: begin m.bus2 = SRC_RAM1; m.a1_wy_we = 1'b1; m.a1_wy_ad = 3'd2;
               m.a2_op = ALU_SUB; m.a2_rx = 4'd1; m.a2_ry = 3'd1; end
      8: begin m.a1_op = ALU_SUB; m.a1_rx = 4'd1; m.a1_ry = 3'd2;
               m.bus1 = SRC_ALU2; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd1; end
      9: begin m.seq_op = SEQ_BRANCH; m.seq_cnd = {1'b0, CND_ALU1_C};
               m.seq_tgt = PC_W'(base + LG_JOIN); end
      10: begin m.a1_op = ALU_PASY; m.a1_ry = 3'd2; end
      11: begin m.bus1 = SRC_ALU1; m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd1; end
      12: begin m.seq_op = SEQ_BRANCH; m.seq_cnd = {1'b1, CND_ALU2_Z};
                m.seq_tgt = PC_W'(base + LG_LOOP); end
      // ---- store the gap
      13: begin m.bus1 = SRC_ROM; m.rom_ad = K_GAP; m = ram_wa(m, 1'b0, SEL_A);
                m.a1_op = ALU_PASX; m.a1_rx = 4'd1; end
      14: begin m.bus1 = SRC_ALU1; m.r1_wd_we = 1'b1; m.r1_wd_ad = 2'd0; m.r1_wd_sel = SEL_A; end
      15: m.r1_we = 1'b1;
      default: m = '0;
    endcase
    return m;
  endfunction

  // Removal look-up for the own contour: REM+i <= CURVE[min(RES+i, 271)].
  function automatic mc_t rem_word(int unsigned off, bit ram2, int unsigned base);
    mc_t      m;
    bus_src_e own;
    m   = '0;
    own = ram2 ? SRC_RAM2 : SRC_RAM1;
    case (off)
      0: begin m.bus1 = SRC_ROM; m.rom_ad = ram2 ? K_RES2 : K_RES1;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd2; m.c_wa_sel = SEL_A; end
      1: begin m.bus1 = SRC_ROM; m.rom_ad = ram2 ? K_REM2 : K_REM1;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd3; m.c_wa_sel = SEL_A; end
      2: begin m.bus1 = SRC_ROM; m.rom_ad = ram2 ? K_CUR2 : K_CUR1;
               m.c_wb_we = 1'b1; m.c_wb_ad = 2'd1; m.c_wb_sel = SEL_A; end
      3: begin m.bus1 = SRC_ROM; m.rom_ad = ram2 ? K_CNT2 : K_CNT1;
               m = ram_wa(m, ram2, SEL_A); end
      4: begin m.bus1 = SRC_ROM; m.bus2 = SRC_ROM; m.rom_ad = K_CLMP;
               m.a1_wy_we = 1'b1; m.a1_wy_ad = 3'd3; m.a1_wy_sel = SEL_A;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd5; m.c_wa_sel = SEL_A; end
      5: begin m.bus1 = own; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd1; end
      // ---- per point
      6: begin m.c_op = ACU_PINC; m.c_ra = 3'd2; m.c_rb = 2'd0; end
      7: begin m.bus2 = SRC_ACU; m = ram_wa(m, ram2, SEL_B); end
      8: begin m.a2_op = ALU_SUB; m.a2_rx = 4'd1; m.a2_ry = 3'd1; end
      9: begin m.bus1 = own; m.a1_wx_we = 1'b1; m.a1_wx_ad = 4'd4;
               m.c_wa_we = 1'b1; m.c_wa_ad = 3'd4; m.c_wa_sel = SEL_A; end
      10: begin m.a1_op = ALU_SUB; m.a1_rx = 4'd4; m.a1_ry = 3'd3;
                m.bus1 = SRC_ALU2; m.a2_wx_we = 1'b1; m.a2_wx_ad = 4'd1; end
      11: begin m.seq_op = SEQ_BRANCH; m.seq_cnd = {1'b1, CND_ALU1_C};
                m.seq_tgt = PC_W'(base + LR_CLAMP); end
      12: begin m.c_op = ACU_ADD; m.c_ra = 3'd4; m.c_rb = 2'd1;
                m.seq_op = SEQ_JUMP; m.seq_tgt = PC_W'(base + LR_CLAMP + 1); end
      13: begin m.c_op = ACU_ADD; m.c_ra = 3'd5; m.c_rb = 2'd1; end
      14: begin m.bus2 = SRC_ACU; m = ram_wa(m, ram2, SEL_B); end
      15: begin m.c_op = ACU_PINC; m.c_ra = 3'd3; m.c_rb = 2'd0; end
      16: begin m.bus1 = own; m.bus2 = SRC_ACU; m = ram_wa(m, ram2, SEL_B);
                if (!ram2) begin m.r1_wd_we = 1'b1; m.r1_wd_ad = 2'd0; m.r1_wd_sel = SEL_A; end
                else       begin m.r2_wd_we = 1'b1; m.r2_wd_ad = 1'b0; m.r2_wd_sel = SEL_A; end
           end
      17: begin if (!ram2) m.r1_we = 1'b1; else m.r2_we = 1'b1;
                m.seq_op = SEQ_BRANCH; m.seq_cnd = {1'b1, CND_ALU2_Z};
                m.seq_tgt = PC_W'(base + LR_LOOP); end
      default: m = '0;
    endcase
    return m;
  endfunction

  function automatic mc_t prog_word(int unsigned a);
    mc_t m;
    m = '0;
    if (a < PASS_LEN)             m = pass_word(a, 1'b0, 0);
    else if (a < SEG0_BASE)       m = pass_word(a - PASS_LEN, 1'b1, PASS_LEN);
    else if (a < SEGT_BASE)       m = seg_word(a - SEG0_BASE, 1'b0, SEG0_BASE);
    else if (a < GAP_BASE)        m = seg_word(a - SEGT_BASE, 1'b1, SEGT_BASE);
    else if (a < REM0_BASE)       m = gap_word(a - GAP_BASE, GAP_BASE);
    else if (a < REMT_BASE)       m = rem_word(a - REM0_BASE, 1'b0, REM0_BASE);
    else if (a < L_HALT)          m = rem_word(a - REMT_BASE, 1'b1, REMT_BASE);
    else if (a == L_HALT)         m.seq_op = SEQ_HALT;
    return m;
  endfunction

  always_comb begin
    if (32'(addr) < MC_DEPTH) word = prog_word(32'(addr));
    else                      word = '0;
  end

  // The microinstruction format must fit the 112-bit ROM word.
  if ($bits(mc_t) > MC_W) begin : g_width_check
    $error("microinstruction wider than the ROM word");
  end
endmodule
