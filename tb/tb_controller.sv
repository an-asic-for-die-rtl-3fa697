// tb_controller: self-checking test of the microcoded controller.
//
// Starts the program and drives random flag values every cycle. A model of
// the program's control flow, written here from the program map (branch on
// ALU_1 carry at words 24/56 to 27/59, loop back on ALU_2 not-zero at 27/59
// to 12/44 and at 31/63 to 7/39, halt at 64), predicts the program counter
// every cycle. Also checks that the issued word is all-zero while idle and
// equal to the ROM word while running, a few fields of known words, the
// done pulse, the return to idle and a restart.
module tb_controller;
  import edm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  flags_t alu1_flags = '0, alu2_flags = '0;
  mc_t mc;
  logic [PC_W-1:0] pc;
  logic busy, done;

  controller dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int taken = 0, not_taken = 0, halts = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run_once(int zbias);
    int exp_pc, cycles;
    @(negedge clk);
    check(!busy && mc == '0, "idle issues no-operation words");
    start = 1; @(negedge clk); start = 0;
    exp_pc = 0; cycles = 0;
    while (1) begin
      int nxt;
      bit c, z;
      c = ($urandom_range(1) == 1);
      z = ($urandom_range(zbias) == 0);
      alu1_flags = '{z: $urandom_range(1), n: $urandom_range(1), c: c};
      alu2_flags = '{z: z, n: $urandom_range(1), c: $urandom_range(1)};
      #1;
      check(busy, "busy while running");
      check(int'(pc) == exp_pc, $sformatf("pc %0d want %0d", pc, exp_pc));
      case (exp_pc)
        0:  check(mc.bus1 == SRC_ROM && mc.rom_ad == K_ZERO && mc.c_wa_we, "word 0 fields");
        21: check(mc.a1_op == ALU_ADD, "word 21 is the distance addition");
        53: check(mc.a1_op == ALU_ADD, "word 53 is the distance addition");
        default: ;
      endcase
      nxt = exp_pc + 1;
      case (exp_pc)
        24, 56: if (c)  begin nxt = exp_pc + 3;  taken++; end else not_taken++;
        27, 59: if (!z) begin nxt = exp_pc - 15; taken++; end else not_taken++;
        31, 63: if (!z) begin nxt = exp_pc - 24; taken++; end else not_taken++;
        71, 93: if (z)  begin nxt = exp_pc + 15; taken++; end else not_taken++;
        85, 107: if (!z) begin nxt = exp_pc - 13; taken++; end else not_taken++;
        117:    if (c)  begin nxt = 120; taken++; end else not_taken++;
        120:    if (!z) begin nxt = 112; taken++; end else not_taken++;
        135, 153: if (!c) begin nxt = exp_pc + 2; taken++; end else not_taken++;
        136, 154: nxt = exp_pc + 2;
        141, 159: if (!z) begin nxt = exp_pc - 11; taken++; end else not_taken++;
        default: ;
      endcase
      if (exp_pc == 160) begin
        check(mc.seq_op == SEQ_HALT, "word 160 halts");
        @(negedge clk);
        check(done && !busy, "done pulse and idle after halt");
        halts++;
        @(negedge clk);
        check(!done, "done is a single pulse");
        break;
      end
      @(negedge clk);
      exp_pc = nxt;
      cycles++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(!busy && int'(pc) == 0, "waits for start");
    run_once(3);
    run_once(1);
    run_once(6);
    check(taken > 0 && not_taken > 0 && halts == 3, "branches taken and not taken, three halts");
    $display("branches taken=%0d not taken=%0d", taken, not_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
