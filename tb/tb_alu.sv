// tb_alu: self-checking test of the ALU execution unit (ALU_1 sizes).
//
// Loads random operands into the X and Y register files from each of the two
// sources (its 16-bit bus and the Q15 product bus), runs every operation and
// compares the output register and the zero/negative/carry flags with values
// computed here. Checks the one-cycle result latency, that NOP holds output
// and flags, and that every register of both files keeps its own value.
module tb_alu;
  import edm_pkg::*;
  localparam int unsigned NX = ALU1_NX, NY = ALU1_NY;

  logic clk = 1'b0, rst_n = 1'b0;
  alu_op_e op = ALU_NOP;
  logic wx_we = 0, wy_we = 0, wx_sel = 0, wy_sel = 0;
  logic [3:0] wx_ad = '0, rx = '0;
  logic [2:0] wy_ad = '0, ry = '0;
  logic [15:0] x_bus = '0, y_bus = '0, q_bus = '0, out;
  flags_t flags;

  alu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] xm[NX], ym[NY];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_op(alu_op_e o, logic [15:0] a, logic [15:0] b,
                           output logic [15:0] r, output flags_t f);
    logic [16:0] s;
    case (o)
      ALU_ADD:  s = {1'b0, a} + {1'b0, b};
      ALU_SUB:  s = {1'b0, a} - {1'b0, b};
      ALU_PASX: s = {1'b0, a};
      ALU_PASY: s = {1'b0, b};
      ALU_AND:  s = {1'b0, a & b};
      ALU_OR:   s = {1'b0, a | b};
      default:  s = {1'b0, a ^ b};
    endcase
    r = s[15:0];
    f.z = (r == 0); f.n = r[15];
    f.c = (o == ALU_ADD || o == ALU_SUB) ? s[16] : 1'b0;
  endtask

  initial begin
    logic [15:0] r; flags_t f; logic [15:0] ro; flags_t fo;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill all registers, alternating sources
    for (int i = 0; i < int'(NX); i++) begin
      xm[i] = 16'($urandom); if (i == 3) xm[i] = 16'h8000; if (i == 4) xm[i] = 0;
      wx_we = 1; wx_ad = 4'(i); wx_sel = i[0];
      x_bus = i[0] ? 16'hDEAD : xm[i]; q_bus = i[0] ? xm[i] : 16'hBEEF;
      @(negedge clk);
    end
    wx_we = 0;
    for (int i = 0; i < int'(NY); i++) begin
      ym[i] = 16'($urandom); if (i == 1) ym[i] = 16'h8000; if (i == 2) ym[i] = 0;
      wy_we = 1; wy_ad = 3'(i); wy_sel = i[0];
      y_bus = i[0] ? 16'hDEAD : ym[i]; q_bus = i[0] ? ym[i] : 16'hBEEF;
      @(negedge clk);
    end
    wy_we = 0;
    // every op on many register pairs
    for (int k = 0; k < 300; k++) begin
      int a, b;
      alu_op_e o;
      a = $urandom_range(NX - 1); b = $urandom_range(NY - 1);
      o = alu_op_e'(3'($urandom_range(7, 1)));
      op = o; rx = 4'(a); ry = 3'(b);
      expect_op(o, xm[a], ym[b], r, f);
      @(negedge clk);
      check(out == r, $sformatf("op %s X%0d=%h Y%0d=%h out %h want %h", o.name(), a, xm[a], b, ym[b], out, r));
      check(flags == f, $sformatf("op %s flags %b want %b", o.name(), flags, f));
    end
    // NOP holds output and flags
    ro = out; fo = flags; op = ALU_NOP; rx = 0; ry = 0;
    repeat (3) @(negedge clk);
    check(out == ro && flags == fo, "NOP holds");
    // directed carry, borrow and zero
    op = ALU_SUB; rx = 4; ry = 1; @(negedge clk);     // 0 - 8000
    check(out == 16'h8000 && flags.c && flags.n && !flags.z, "borrow");
    op = ALU_ADD; rx = 3; ry = 1; @(negedge clk);     // 8000 + 8000
    check(out == 16'h0000 && flags.c && flags.z, "carry and zero");
    op = ALU_SUB; rx = 4; ry = 2; @(negedge clk);     // 0 - 0
    check(out == 0 && !flags.c && flags.z, "no borrow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
