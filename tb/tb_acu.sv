// tb_acu: self-checking test of the address computation unit.
//
// Loads pointers and steps from both buses, then checks PASS, ADD and the
// post-increment (output is the old pointer, the register advances by the
// step, modulo 2^12), the priority of a bus write over a post-increment to
// the same register, NOP holding the output, and the one-cycle latency.
module tb_acu;
  import edm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  acu_op_e op = ACU_NOP;
  logic wa_we = 0, wb_we = 0, wa_sel = 0, wb_sel = 0;
  logic [2:0] wa_ad = '0, ra = '0;
  logic [1:0] wb_ad = '0, rb = '0;
  logic [15:0] bus1 = '0, bus2 = '0, out;

  acu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int am[7], bm[3];

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 7; i++) begin
      am[i] = $urandom_range(4095); if (i == 6) am[i] = 4094;
      wa_we = 1; wa_ad = 3'(i); wa_sel = i[0];
      bus1 = i[0] ? 16'hF000 : 16'(am[i]) | 16'hF000; bus2 = 16'(am[i]);
      @(negedge clk);
    end
    wa_we = 0;
    for (int i = 0; i < 3; i++) begin
      bm[i] = (i == 0) ? 1 : $urandom_range(4095);
      wb_we = 1; wb_ad = 2'(i); wb_sel = ~i[0];
      bus2 = i[0] ? 16'h0 : 16'(bm[i]); bus1 = 16'(bm[i]);
      @(negedge clk);
    end
    wb_we = 0;
    for (int k = 0; k < 200; k++) begin
      int a, b, e;
      acu_op_e o;
      a = $urandom_range(6); b = $urandom_range(2);
      o = acu_op_e'(2'($urandom_range(3, 1)));
      op = o; ra = 3'(a); rb = 2'(b);
      e = (o == ACU_ADD) ? (am[a] + bm[b]) % 4096 : am[a];
      if (o == ACU_PINC) am[a] = (am[a] + bm[b]) % 4096;
      @(negedge clk);
      check(out == 16'(e), $sformatf("%s A%0d B%0d out %0d want %0d", o.name(), a, b, out, e));
    end
    // NOP holds
    op = ACU_NOP; ra = 0; @(negedge clk); @(negedge clk);
    begin int e; e = out; op = ACU_NOP; @(negedge clk); check(out == 16'(e), "NOP holds"); end
    // bus write wins over post-increment
    op = ACU_PINC; ra = 2; rb = 0; wa_we = 1; wa_ad = 2; wa_sel = 0; bus1 = 16'd77;
    @(negedge clk);
    wa_we = 0; op = ACU_PASS;
    @(negedge clk);
    check(out == 16'd77, "bus write wins over post-increment");
    // post-increment sequence with step 1 wraps at 4096
    op = ACU_PINC; ra = 6; rb = 0;
    for (int k = 0; k < 4; k++) begin
      int e; e = am[6]; am[6] = (am[6] + 1) % 4096;
      @(negedge clk);
      check(out == 16'(e), $sformatf("sequence %0d: %0d want %0d", k, out, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
