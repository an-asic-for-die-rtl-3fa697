// tb_const_rom: checks every word of the 21-word constant ROM against the
// constants the microprogram needs and the RAM layout (five words per point
// for 192 and 151 points: results, segments, removals and the 272-word curve
// at 2, 3, 4 and 5 times the capacity; gap and count in the last RAM words),
// and that unused and
// out-of-range addresses read 0.
module tb_const_rom;
  import edm_pkg::*;
  logic [4:0] addr = '0;
  logic [15:0] data;
  const_rom dut (.*);

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
    int e;
    for (int a = 0; a < 32; a++) begin
      case (a)
        0: e = 0;
        1: e = 1;
        2: e = 65535;
        3: e = 2 * 192;
        4: e = 2 * 151;
        5: e = 1238 - 1;
        6: e = 1030 - 1;
        7: e = 3 * 192;
        8: e = 3 * 151;
        9: e = 1238 - 2;
        10: e = 4 * 192;
        11: e = 4 * 151;
        12: e = 5 * 192;
        13: e = 5 * 151;
        14: e = 271;
        default: e = 0;
      endcase
      addr = 5'(a);
      #1;
      checks++;
      if (int'(data) != e) begin
        failures++;
        $display("FAIL: ROM[%0d] = %0d, want %0d", a, data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
