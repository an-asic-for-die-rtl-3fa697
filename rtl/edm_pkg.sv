// edm_pkg: shared sizes, operation codes and the microinstruction format of the
// spark-erosion simulation processor.
//
// The processor is a single microcoded datapath: two 16-bit ALUs, a 16x16->32
// multiplier, an address computation unit (ACU), a 21-word constant ROM and two
// data RAMs, joined by two 16-bit buses and one 32-bit bus. Every clock cycle
// the controller issues one 112-bit microinstruction that sets every unit.
//
// Taken from the architecture summary of the design: the word lengths, the
// register-file sizes of every execution unit, the RAM and ROM sizes, the bus
// widths and the 163 x 112-bit microcode store. This package's own choices:
// the operation sets, the encodings, the field layout of the microinstruction
// (which happens to fill exactly 112 bits), the data layout in the RAMs and
// the microprogram map.
package edm_pkg;

  // ---------------------------------------------------------------- word sizes
  localparam int unsigned DW   = 16;   // data bus / ALU word length
  localparam int unsigned PW   = 32;   // multiplier product / BUS_3 width
  localparam int unsigned AW   = 12;   // ACU address width
  localparam int unsigned MC_W = 112;  // microinstruction width
  localparam int unsigned MC_DEPTH = 163;  // microcode words
  localparam int unsigned PC_W = 8;

  // Register-file sizes of the execution units (R1 = first input, R2 = second)
  localparam int unsigned ALU1_NX = 11, ALU1_NY = 6;
  localparam int unsigned ALU2_NX = 9,  ALU2_NY = 7;
  localparam int unsigned MULT_NX = 2,  MULT_NY = 4;
  localparam int unsigned ACU_NA  = 7,  ACU_NB  = 3;
  localparam int unsigned RAM1_NA = 2,  RAM1_ND = 4;
  localparam int unsigned RAM2_NA = 1,  RAM2_ND = 2;
  localparam int unsigned RAM1_WORDS = 1238;
  localparam int unsigned RAM2_WORDS = 1030;
  localparam int unsigned ROM_WORDS  = 21;
  localparam int unsigned ROM_AW     = 5;

  // Address width of a register file with n entries (at least one bit).
  function automatic int unsigned rfaw(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // ---------------------------------------------------------------- bus sources
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,
    SRC_ALU1 = 3'd1,
    SRC_ALU2 = 3'd2,
    SRC_RAM1 = 3'd3,
    SRC_RAM2 = 3'd4,
    SRC_ROM  = 3'd5,
    SRC_ACU  = 3'd6,
    SRC_MULH = 3'd7   // multiplier product bits [30:15] (Q15 product)
  } bus_src_e;

  // Register-file write source. ALU ports: 0 = their 16-bit bus, 1 = BUS_3
  // scaled to Q15. Other units: 0 = BUS_1, 1 = BUS_2.
  localparam logic SEL_A = 1'b0;
  localparam logic SEL_B = 1'b1;

  // ---------------------------------------------------------------- ALU
  typedef enum logic [2:0] {
    ALU_NOP  = 3'd0,  // hold output and flags
    ALU_ADD  = 3'd1,
    ALU_SUB  = 3'd2,  // X - Y; C = borrow (X < Y unsigned)
    ALU_PASX = 3'd3,
    ALU_PASY = 3'd4,
    ALU_AND  = 3'd5,
    ALU_OR   = 3'd6,
    ALU_XOR  = 3'd7
  } alu_op_e;

  typedef struct packed {
    logic z;  // result zero
    logic n;  // result negative (bit 15)
    logic c;  // carry out (ADD) or borrow (SUB)
  } flags_t;

  // ---------------------------------------------------------------- ACU
  typedef enum logic [1:0] {
    ACU_NOP  = 2'd0,  // hold output
    ACU_PASS = 2'd1,  // out <= A
    ACU_ADD  = 2'd2,  // out <= A + B
    ACU_PINC = 2'd3   // out <= A ; A <= A + B  (post-increment)
  } acu_op_e;

  // ---------------------------------------------------------------- sequencer
  typedef enum logic [1:0] {
    SEQ_NEXT   = 2'd0,
    SEQ_JUMP   = 2'd1,
    SEQ_BRANCH = 2'd2,  // jump when the selected condition holds
    SEQ_HALT   = 2'd3
  } seq_op_e;

  // Condition: bit 2 inverts, bits 1:0 select the flag.
  localparam logic [1:0] CND_ALU1_C = 2'd0;
  localparam logic [1:0] CND_ALU1_Z = 2'd1;
  localparam logic [1:0] CND_ALU2_Z = 2'd2;
  localparam logic [1:0] CND_ALU2_N = 2'd3;

  // ---------------------------------------------------------------- microword
  typedef struct packed {
    // controller (13)
    seq_op_e              seq_op;
    logic [2:0]           seq_cnd;
    logic [PC_W-1:0]      seq_tgt;
    // buses (6)
    bus_src_e             bus1;
    bus_src_e             bus2;
    // ALU_1 (21)
    alu_op_e              a1_op;
    logic                 a1_wx_we; logic [3:0] a1_wx_ad; logic a1_wx_sel;
    logic                 a1_wy_we; logic [2:0] a1_wy_ad; logic a1_wy_sel;
    logic [3:0]           a1_rx;    logic [2:0] a1_ry;
    // ALU_2 (21)
    alu_op_e              a2_op;
    logic                 a2_wx_we; logic [3:0] a2_wx_ad; logic a2_wx_sel;
    logic                 a2_wy_we; logic [2:0] a2_wy_ad; logic a2_wy_sel;
    logic [3:0]           a2_rx;    logic [2:0] a2_ry;
    // MULT (10): the product register loads X[rx]*Y[ry] every cycle
    logic                 m_wx_we;  logic       m_wx_ad;  logic m_wx_sel;
    logic                 m_wy_we;  logic [1:0] m_wy_ad;  logic m_wy_sel;
    logic                 m_rx;     logic [1:0] m_ry;
    // ACU (16)
    acu_op_e              c_op;
    logic                 c_wa_we;  logic [2:0] c_wa_ad;  logic c_wa_sel;
    logic                 c_wb_we;  logic [1:0] c_wb_ad;  logic c_wb_sel;
    logic [2:0]           c_ra;     logic [1:0] c_rb;
    // ROM (5)
    logic [ROM_AW-1:0]    rom_ad;
    // RAM_1 (11): the read register loads mem[A[ra]] every cycle
    logic                 r1_we;
    logic                 r1_wa_we; logic       r1_wa_ad; logic r1_wa_sel;
    logic                 r1_wd_we; logic [1:0] r1_wd_ad; logic r1_wd_sel;
    logic                 r1_ra;    logic [1:0] r1_rd;
    // RAM_2 (9)
    logic                 r2_we;
    logic                 r2_wa_we; logic       r2_wa_ad; logic r2_wa_sel;
    logic                 r2_wd_we; logic       r2_wd_ad; logic r2_wd_sel;
    logic                 r2_ra;    logic       r2_rd;
  } mc_t;

  // ---------------------------------------------------------------- constants
  // ROM word addresses of the constants the microprogram uses.
  localparam logic [ROM_AW-1:0] K_ZERO = 5'd0;
  localparam logic [ROM_AW-1:0] K_ONE  = 5'd1;
  localparam logic [ROM_AW-1:0] K_MAX  = 5'd2;
  localparam logic [ROM_AW-1:0] K_RES1 = 5'd3;
  localparam logic [ROM_AW-1:0] K_RES2 = 5'd4;
  localparam logic [ROM_AW-1:0] K_CNT1 = 5'd5;
  localparam logic [ROM_AW-1:0] K_CNT2 = 5'd6;
  localparam logic [ROM_AW-1:0] K_SEG1 = 5'd7;
  localparam logic [ROM_AW-1:0] K_SEG2 = 5'd8;
  localparam logic [ROM_AW-1:0] K_GAP  = 5'd9;
  localparam logic [ROM_AW-1:0] K_REM1 = 5'd10;
  localparam logic [ROM_AW-1:0] K_REM2 = 5'd11;
  localparam logic [ROM_AW-1:0] K_CUR1 = 5'd12;
  localparam logic [ROM_AW-1:0] K_CUR2 = 5'd13;
  localparam logic [ROM_AW-1:0] K_CLMP = 5'd14;

  // Removal curve: the measured removal per discharge as a function of the
  // local gap, CURVE_LEN words per electrode, indexed by min(d2, CURVE_LEN-1).
  localparam int unsigned CURVE_LEN = 272;

  // Data layout in the RAMs. A contour of N points takes five words per
  // point: x,y pairs at words 0..2N-1, the nearest squared distance to the
  // opposite contour at RES+i, the squared length of segment i..i+1 at SEG+i
  // and the looked-up removal at REM+i. The electrode's removal curve follows;
  // the point count sits in the last word; RAM_1 also holds the gap.
  localparam int unsigned MAX_PTS1  = (RAM1_WORDS - 2 - CURVE_LEN) / 5;  // 192
  localparam int unsigned RES1_BASE = 2 * MAX_PTS1;          // 384
  localparam int unsigned SEG1_BASE = 3 * MAX_PTS1;          // 576
  localparam int unsigned REM1_BASE = 4 * MAX_PTS1;          // 768
  localparam int unsigned CUR1_BASE = 5 * MAX_PTS1;          // 960
  localparam int unsigned GAP_ADDR  = RAM1_WORDS - 2;        // 1236
  localparam int unsigned CNT1_ADDR = RAM1_WORDS - 1;        // 1237
  localparam int unsigned MAX_PTS2  = (RAM2_WORDS - 1 - CURVE_LEN) / 5;  // 151
  localparam int unsigned RES2_BASE = 2 * MAX_PTS2;          // 302
  localparam int unsigned SEG2_BASE = 3 * MAX_PTS2;          // 453
  localparam int unsigned REM2_BASE = 4 * MAX_PTS2;          // 604
  localparam int unsigned CUR2_BASE = 5 * MAX_PTS2;          // 755
  localparam int unsigned CNT2_ADDR = RAM2_WORDS - 1;        // 1029

  // ---------------------------------------------------------------- program map
  // Pass 0 finds, for every workpiece point (RAM_1), the squared distance to
  // the nearest tool point (RAM_2); pass 1 the reverse. Each is PASS_LEN
  // words; the L_ labels are offsets in a pass. Then the segment lengths of
  // the workpiece and of the tool contour (SEG_LEN words each), then the gap,
  // the smallest of the workpiece results (GAP_LEN words), then the removal
  // look-up for the workpiece and for the tool (REM_LEN words each), then halt.
  localparam int unsigned PASS_LEN  = 32;
  localparam int unsigned L_OUTER   = 7;   // per own point
  localparam int unsigned L_INNER   = 12;  // per opposite point
  localparam int unsigned L_UPDATE  = 25;  // two words: best <= d2
  localparam int unsigned L_JOIN    = 27;  // inner loop-back branch
  localparam int unsigned L_STORE   = 28;  // store best, outer loop-back
  localparam int unsigned SEG_LEN   = 22;
  localparam int unsigned LS_LOOP   = 8;   // per segment
  localparam int unsigned GAP_LEN   = 16;
  localparam int unsigned LG_LOOP   = 4;   // per workpiece result
  localparam int unsigned LG_UPDATE = 10;  // two words: gap <= result
  localparam int unsigned LG_JOIN   = 12;
  localparam int unsigned SEG0_BASE = 2 * PASS_LEN;              // 64
  localparam int unsigned SEGT_BASE = SEG0_BASE + SEG_LEN;       // 86
  localparam int unsigned GAP_BASE  = SEGT_BASE + SEG_LEN;       // 108
  localparam int unsigned REM_LEN   = 18;
  localparam int unsigned LR_LOOP   = 6;   // per point
  localparam int unsigned LR_DIRECT = 12;  // index = d2
  localparam int unsigned LR_CLAMP  = 13;  // index = CURVE_LEN - 1
  localparam int unsigned REM0_BASE = GAP_BASE + GAP_LEN;        // 124
  localparam int unsigned REMT_BASE = REM0_BASE + REM_LEN;       // 142
  localparam int unsigned L_HALT    = REMT_BASE + REM_LEN;       // 160
  localparam int unsigned PROG_LEN  = L_HALT + 1;

  // Cycle counts of the program pieces.
  localparam int unsigned CYC_PRO   = 7;       // pass prologue
  localparam int unsigned CYC_OUTER = 5 + 4;   // per own point
  localparam int unsigned CYC_INNER_SKIP = 14; // per opposite point
  localparam int unsigned CYC_INNER_UPD  = 16; // ... when best improves
  localparam int unsigned CYC_SEG_PRO    = 8;
  localparam int unsigned CYC_SEG        = 14; // per segment
  localparam int unsigned CYC_GAP_PRO    = 4 + 3;
  localparam int unsigned CYC_GAP_SKIP   = 7;  // per workpiece result
  localparam int unsigned CYC_GAP_UPD    = 9;
  localparam int unsigned CYC_REM_PRO    = 6;
  localparam int unsigned CYC_REM        = 11; // per point

endpackage
