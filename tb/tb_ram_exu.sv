// tb_ram_exu: self-checking test of a data RAM execution unit (RAM_1 size).
//
// Writes through the host port and through the microinstruction path
// (address and data registers loaded from either bus, then a write), reads
// back both ways and compares with a reference array. Checks the one-cycle
// read latency, that a write in a cycle reads the old word, the first and
// last word (1237), and that addresses past the end write nothing and read 0.
module tb_ram_exu;
  import edm_pkg::*;
  localparam int unsigned WORDS = RAM1_WORDS;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 0, wa_we = 0, wa_sel = 0, wd_we = 0, wd_sel = 0;
  logic wa_ad = 0, ra = 0;
  logic [1:0] wd_ad = '0, rd = '0;
  logic [15:0] bus1 = '0, bus2 = '0, rdata;
  logic ext_en = 0, ext_we = 0;
  logic [11:0] ext_addr = '0;
  logic [15:0] ext_wdata = '0;

  ram_exu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] ref_mem[WORDS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic ext_write(int a, logic [15:0] d);
    ext_en = 1; ext_we = 1; ext_addr = 12'(a); ext_wdata = d;
    @(negedge clk);
    ext_en = 0; ext_we = 0;
    if (a < int'(WORDS)) ref_mem[a] = d;
  endtask

  task automatic ext_read(int a, output logic [15:0] d);
    ext_en = 1; ext_we = 0; ext_addr = 12'(a);
    @(negedge clk);
    ext_en = 0;
    d = rdata;
  endtask

  initial begin
    logic [15:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // host fill of the whole RAM
    for (int a = 0; a < int'(WORDS); a++) ext_write(a, 16'($urandom));
    for (int k = 0; k < 200; k++) begin
      int a; a = (k == 0) ? 0 : (k == 1) ? int'(WORDS) - 1 : $urandom_range(WORDS - 1);
      ext_read(a, d);
      check(d == ref_mem[a], $sformatf("host read %0d: %h want %h", a, d, ref_mem[a]));
    end
    // out of range
    ext_write(WORDS, 16'h1234);
    ext_read(WORDS, d);
    check(d == 0, "read past the end is 0");
    ext_read(0, d);
    check(d == ref_mem[0], "write past the end does not wrap");
    // microinstruction path: load A0/A1 and D0..D3, write, read
    for (int k = 0; k < 100; k++) begin
      int a0, a1, di;
      logic [15:0] v;
      a0 = $urandom_range(WORDS - 1); a1 = $urandom_range(WORDS - 1);
      di = $urandom_range(3); v = 16'($urandom);
      wa_we = 1; wa_ad = 0; wa_sel = 0; bus1 = 16'(a0); bus2 = 16'hFFFF; @(negedge clk);
      wa_we = 1; wa_ad = 1; wa_sel = 1; bus2 = 16'(a1); bus1 = 16'hFFFF; @(negedge clk);
      wa_we = 0;
      wd_we = 1; wd_ad = 2'(di); wd_sel = k[0]; bus1 = k[0] ? ~v : v; bus2 = k[0] ? v : ~v;
      @(negedge clk);
      wd_we = 0;
      // write D[di] at A0: the read register gets the old word
      we = 1; ra = 0; rd = 2'(di);
      @(negedge clk);
      we = 0;
      check(rdata == ref_mem[a0], $sformatf("read during write gives old word at %0d", a0));
      ref_mem[a0] = v;
      // read A1 then A0
      ra = 1; @(negedge clk);
      check(rdata == ref_mem[a1], $sformatf("read A1=%0d: %h want %h", a1, rdata, ref_mem[a1]));
      ra = 0; @(negedge clk);
      check(rdata == ref_mem[a0], $sformatf("read A0=%0d: %h want %h", a0, rdata, ref_mem[a0]));
    end
    // host sees the microinstruction writes
    for (int a = 0; a < int'(WORDS); a += 7) begin
      ext_read(a, d);
      check(d == ref_mem[a], $sformatf("final host read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
