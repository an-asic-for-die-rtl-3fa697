// tb_bus_mux: drives distinct random values on every source of a bus and
// checks that each select value puts the right one on the bus (and 0 for
// no source).
module tb_bus_mux;
  import edm_pkg::*;
  bus_src_e sel = SRC_NONE;
  logic [15:0] alu1, alu2, ram1, ram2, rom, acu, mulh, bus;
  bus_mux dut (.*);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v[8];
    for (int k = 0; k < 20; k++) begin
      for (int i = 1; i < 8; i++) v[i] = 16'($urandom) | 16'h1;
      v[0] = 0;
      alu1 = v[1]; alu2 = v[2]; ram1 = v[3]; ram2 = v[4]; rom = v[5]; acu = v[6]; mulh = v[7];
      for (int s = 0; s < 8; s++) begin
        sel = bus_src_e'(3'(s));
        #1;
        checks++;
        if (bus != v[s]) begin failures++; $display("FAIL: sel %0d bus %h want %h", s, bus, v[s]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
