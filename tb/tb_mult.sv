// tb_mult: self-checking test of the multiplier execution unit.
//
// Loads signed operands into the two X and four Y registers from BUS_1 and
// BUS_2, selects every pair and checks the 32-bit signed product one cycle
// later, including the extreme values -32768 and 32767.
module tb_mult;
  import edm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wx_we = 0, wy_we = 0, wx_sel = 0, wy_sel = 0;
  logic wx_ad = 0, rx = 0;
  logic [1:0] wy_ad = '0, ry = '0;
  logic [15:0] bus1 = '0, bus2 = '0;
  logic [31:0] prod;

  mult dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [15:0] xm[2], ym[4];

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
    for (int round = 0; round < 40; round++) begin
      for (int i = 0; i < 2; i++) begin
        xm[i] = 16'($urandom);
        if (round == 0) xm[i] = (i == 0) ? -16'sd32768 : 16'sd32767;
        wx_we = 1; wx_ad = i[0]; wx_sel = round[0];
        if (round[0]) begin bus2 = xm[i]; bus1 = ~xm[i]; end
        else          begin bus1 = xm[i]; bus2 = ~xm[i]; end
        @(negedge clk);
      end
      wx_we = 0;
      for (int i = 0; i < 4; i++) begin
        ym[i] = 16'($urandom);
        if (round == 0) ym[i] = (i == 0) ? -16'sd32768 : (i == 1) ? 16'sd32767 : 16'(i);
        wy_we = 1; wy_ad = 2'(i); wy_sel = ~round[0];
        if (!round[0]) begin bus2 = ym[i]; bus1 = ~ym[i]; end
        else           begin bus1 = ym[i]; bus2 = ~ym[i]; end
        @(negedge clk);
      end
      wy_we = 0;
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 4; b++) begin
          logic signed [31:0] e;
          rx = a[0]; ry = 2'(b);
          e = 32'(xm[a]) * 32'(ym[b]);
          @(negedge clk);
          check(prod == e, $sformatf("%0d * %0d = %0d, want %0d", xm[a], ym[b], $signed(prod), e));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
