// tb_edm_asic: end-to-end test of the spark-erosion processor at its default
// sizes.
//
// Loads a workpiece contour into RAM_1 and a tool contour into RAM_2 through
// the host port, starts the microprogram and, once `done` pulses, reads back
// for every point of both contours the nearest squared distance and the
// squared length of the segment to the next point, and the gap. The expected
// values and the exact run length in cycles are computed here from the
// contours alone:
//   d2(p, q)  = floor(dx^2 / 2^15) + floor(dy^2 / 2^15)
//   result(p) = min over q of d2(p, q);  seg(i) = d2(p_i, p_i+1)
//   gap       = min over workpiece points of result(p)
//   removal(p)= curve[min(result(p), 271)], each electrode its own curve
//   cycles    = 15 + 9(M+N) + 28MN + 2U + 16 + 14(M+N-2) + 7 + 7M + 2G
//               + 12 + 11(M+N)
// where U and G count the improvements of the running minimum in the
// nearest-point search and in the gap search.
// Runs: the smallest contours (1 point each, no segments), small random
// contours, a case with repeated and far-apart points, and both RAMs filled
// to capacity (192 and 151 points). Each run loads fresh random curves. The microprogram counter is watched to
// count the mechanisms: best-distance updates and skipped updates, inner and
// outer loop iterations, both passes, segment iterations, gap updates and
// skipped gap updates, an empty segment loop, curve look-ups with and
// without clamping, and the halt.
module tb_edm_asic;
  import edm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic [PC_W-1:0] pc;
  logic h_en = 1'b0, h_sel = 1'b0, h_we = 1'b0;
  logic [AW-1:0] h_addr = '0;
  logic [DW-1:0] h_wdata = '0, h_rdata;

  edm_asic dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_upd = 0, n_inner = 0, n_outer = 0, n_pass1 = 0, n_halt = 0, n_busy = 0;
  int n_seg = 0, n_gap = 0, n_gap_upd = 0, n_seg_empty = 0, n_direct = 0, n_clamp = 0;
  logic [PC_W-1:0] pc_prev = '0;

  always @(posedge clk) if (busy) begin
    n_busy++;
    if (pc == PC_W'(L_UPDATE) || pc == PC_W'(PASS_LEN + L_UPDATE)) n_upd++;
    if (pc == PC_W'(L_INNER)  || pc == PC_W'(PASS_LEN + L_INNER))  n_inner++;
    if (pc == PC_W'(L_OUTER)  || pc == PC_W'(PASS_LEN + L_OUTER))  n_outer++;
    if (pc == PC_W'(PASS_LEN)) n_pass1++;
    if (pc == PC_W'(L_HALT)) n_halt++;
    if (pc == PC_W'(SEG0_BASE + LS_LOOP) || pc == PC_W'(SEGT_BASE + LS_LOOP)) n_seg++;
    if (pc == PC_W'(GAP_BASE + LG_LOOP))   n_gap++;
    if (pc == PC_W'(GAP_BASE + LG_UPDATE)) n_gap_upd++;
    if (pc_prev == PC_W'(SEG0_BASE + LS_LOOP - 1) && pc == PC_W'(SEGT_BASE)) n_seg_empty++;
    if (pc == PC_W'(REM0_BASE + LR_DIRECT) || pc == PC_W'(REMT_BASE + LR_DIRECT)) n_direct++;
    if (pc == PC_W'(REM0_BASE + LR_CLAMP)  || pc == PC_W'(REMT_BASE + LR_CLAMP))  n_clamp++;
    pc_prev <= pc;
  end

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic hwrite(input logic sel, input int addr, input logic [15:0] d);
    @(negedge clk);
    h_en = 1'b1; h_sel = sel; h_we = 1'b1; h_addr = AW'(addr); h_wdata = d;
    @(negedge clk);
    h_en = 1'b0; h_we = 1'b0;
  endtask

  task automatic hread(input logic sel, input int addr, output logic [15:0] d);
    @(negedge clk);
    h_en = 1'b1; h_sel = sel; h_we = 1'b0; h_addr = AW'(addr);
    @(negedge clk);
    h_en = 1'b0;
    d = h_rdata;
  endtask

  int wx[MAX_PTS1], wy[MAX_PTS1], tx[MAX_PTS2], ty[MAX_PTS2];
  int cw[CURVE_LEN], ct[CURVE_LEN];
  int wres[MAX_PTS1], tres[MAX_PTS2];

  function automatic int d2(int ax, int ay, int bx, int by);
    longint dx, dy;
    dx = ax - bx; dy = ay - by;
    return int'((dx * dx) >>> 15) + int'((dy * dy) >>> 15);
  endfunction

  // One complete run with M workpiece and N tool points already in wx..ty.
  task automatic run(input int m, input int n, input string name);
    int exp_upd, best, dd, cyc0, exp_cyc, ups0, gap, gap_upd;
    logic [15:0] r;
    for (int i = 0; i < m; i++) begin
      hwrite(1'b0, 2 * i, 16'(wx[i])); hwrite(1'b0, 2 * i + 1, 16'(wy[i]));
    end
    hwrite(1'b0, CNT1_ADDR, 16'(m));
    for (int j = 0; j < n; j++) begin
      hwrite(1'b1, 2 * j, 16'(tx[j])); hwrite(1'b1, 2 * j + 1, 16'(ty[j]));
    end
    hwrite(1'b1, CNT2_ADDR, 16'(n));
    for (int k = 0; k < int'(CURVE_LEN); k++) begin
      cw[k] = $urandom_range(65535); ct[k] = $urandom_range(65535);
      hwrite(1'b0, CUR1_BASE + k, 16'(cw[k]));
      hwrite(1'b1, CUR2_BASE + k, 16'(ct[k]));
    end

    cyc0 = n_busy; ups0 = n_upd;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    wait (done); @(negedge clk);

    exp_upd = 0; gap = 'hFFFF; gap_upd = 0;
    for (int i = 0; i < m; i++) begin
      best = 'hFFFF;
      for (int j = 0; j < n; j++) begin
        dd = d2(wx[i], wy[i], tx[j], ty[j]);
        if (dd <= best) begin best = dd; exp_upd++; end
      end
      hread(1'b0, RES1_BASE + i, r);
      check(int'(r) == best, $sformatf("%s: workpiece %0d got %0d want %0d", name, i, r, best));
      wres[i] = best;
      if (best <= gap) begin gap = best; gap_upd++; end
    end
    hread(1'b0, GAP_ADDR, r);
    check(int'(r) == gap, $sformatf("%s: gap %0d want %0d", name, r, gap));
    for (int i = 0; i + 1 < m; i++) begin
      hread(1'b0, SEG1_BASE + i, r);
      dd = d2(wx[i], wy[i], wx[i+1], wy[i+1]);
      check(int'(r) == dd, $sformatf("%s: workpiece segment %0d got %0d want %0d", name, i, r, dd));
    end
    for (int j = 0; j + 1 < n; j++) begin
      hread(1'b1, SEG2_BASE + j, r);
      dd = d2(tx[j], ty[j], tx[j+1], ty[j+1]);
      check(int'(r) == dd, $sformatf("%s: tool segment %0d got %0d want %0d", name, j, r, dd));
    end
    for (int j = 0; j < n; j++) begin
      best = 'hFFFF;
      for (int i = 0; i < m; i++) begin
        dd = d2(tx[j], ty[j], wx[i], wy[i]);
        if (dd <= best) begin best = dd; exp_upd++; end
      end
      hread(1'b1, RES2_BASE + j, r);
      check(int'(r) == best, $sformatf("%s: tool %0d got %0d want %0d", name, j, r, best));
      tres[j] = best;
    end
    for (int i = 0; i < m; i++) begin
      dd = cw[(wres[i] < int'(CURVE_LEN)) ? wres[i] : int'(CURVE_LEN) - 1];
      hread(1'b0, REM1_BASE + i, r);
      check(int'(r) == dd, $sformatf("%s: workpiece removal %0d got %0d want %0d", name, i, r, dd));
    end
    for (int j = 0; j < n; j++) begin
      dd = ct[(tres[j] < int'(CURVE_LEN)) ? tres[j] : int'(CURVE_LEN) - 1];
      hread(1'b1, REM2_BASE + j, r);
      check(int'(r) == dd, $sformatf("%s: tool removal %0d got %0d want %0d", name, j, r, dd));
    end
    // contours and counts are left intact
    hread(1'b0, CNT1_ADDR, r); check(int'(r) == m, $sformatf("%s: RAM_1 count", name));
    hread(1'b1, CNT2_ADDR, r); check(int'(r) == n, $sformatf("%s: RAM_2 count", name));
    hread(1'b0, 2 * (m - 1) + 1, r); check(int'(r) == wy[m-1], $sformatf("%s: RAM_1 data", name));
    hread(1'b1, 2 * (n - 1), r);     check(int'(r) == tx[n-1], $sformatf("%s: RAM_2 data", name));

    exp_cyc = 2 * CYC_PRO + 1 + CYC_OUTER * (m + n) + CYC_INNER_SKIP * 2 * m * n
              + (CYC_INNER_UPD - CYC_INNER_SKIP) * exp_upd
              + 2 * CYC_SEG_PRO + CYC_SEG * (m - 1 + n - 1)
              + CYC_GAP_PRO + CYC_GAP_SKIP * m + (CYC_GAP_UPD - CYC_GAP_SKIP) * gap_upd
              + 2 * CYC_REM_PRO + CYC_REM * (m + n);
    check(n_busy - cyc0 == exp_cyc,
          $sformatf("%s: %0d cycles, want %0d", name, n_busy - cyc0, exp_cyc));
    check(n_upd - ups0 == exp_upd, $sformatf("%s: %0d updates, want %0d", name, n_upd - ups0, exp_upd));
    $display("%s: M=%0d N=%0d cycles=%0d updates=%0d", name, m, n, n_busy - cyc0, exp_upd);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // smallest contours
    wx[0] = 100; wy[0] = 200; tx[0] = 130; ty[0] = 160;
    run(1, 1, "single");

    // small random contours
    for (int i = 0; i < 5; i++) begin wx[i] = $urandom_range(32767); wy[i] = $urandom_range(32767); end
    for (int j = 0; j < 4; j++) begin tx[j] = $urandom_range(32767); ty[j] = $urandom_range(32767); end
    run(5, 4, "random");

    // repeated points (ties), extreme distances, and a tool point on a workpiece point
    wx[0] = 0;     wy[0] = 0;     wx[1] = 32767; wy[1] = 32767; wx[2] = 500; wy[2] = 500;
    tx[0] = 32767; ty[0] = 0;     tx[1] = 0;     ty[1] = 32767; tx[2] = 500; ty[2] = 500;
    tx[3] = 32767; ty[3] = 0;
    run(3, 4, "ties");

    // distances around the end of the removal curve: 2900^2/2^15 = 256, 3000^2/2^15 = 274
    wx[0] = 10000; wy[0] = 10000; wx[1] = 20000; wy[1] = 10000;
    tx[0] = 12900; ty[0] = 10000; tx[1] = 23000; ty[1] = 10000;
    run(2, 2, "curve end");

    // a contour that runs back on itself
    for (int i = 0; i < 6; i++) begin wx[i] = 20000 - 900 * i; wy[i] = 5000 + 400 * (i % 2); end
    for (int j = 0; j < 2; j++) begin tx[j] = 16000 + 10 * j; ty[j] = 7000; end
    run(6, 2, "backwards");

    // both RAMs at capacity: a wavy workpiece surface under a tool profile
    for (int i = 0; i < MAX_PTS1; i++) begin
      wx[i] = 2000 + 70 * i; wy[i] = 8000 + ((i % 37) * 113);
    end
    for (int j = 0; j < MAX_PTS2; j++) begin
      tx[j] = 3000 + 75 * j; ty[j] = 14000 + $urandom_range(3000);
    end
    run(MAX_PTS1, MAX_PTS2, "full");

    check(n_upd > 0,   "a best-distance update happened");
    check(n_inner > n_upd, "a skipped update happened");
    check(n_outer > 0, "outer loop ran");
    check(n_pass1 == 6, "second pass ran in every run");
    check(n_halt == 6, "every run halted");
    check(n_seg > 0, "segment loop ran");
    check(n_seg_empty > 0, "empty segment loop skipped");
    check(n_gap_upd > 0 && n_gap > n_gap_upd, "gap updated and kept");
    check(n_direct > 0 && n_clamp > 0, "curve read with and without clamping");
    $display("mechanisms: updates=%0d skips=%0d inner=%0d outer=%0d pass1=%0d halts=%0d",
             n_upd, n_inner - n_upd, n_inner, n_outer, n_pass1, n_halt);
    $display("mechanisms: segments=%0d empty_segment_loops=%0d gap_steps=%0d gap_updates=%0d",
             n_seg, n_seg_empty, n_gap, n_gap_upd);
    $display("mechanisms: curve_direct=%0d curve_clamped=%0d", n_direct, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
