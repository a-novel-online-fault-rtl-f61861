// tb_noise_filter_example: a small filter circuit repaired on the 8x8 array.
//
// Runs a binary noise filter on the array: each of the 8 outputs is the
// majority (3-tap median) of three neighbouring inputs, y[i] = maj(x[i],
// x[i+1], x[i+2]) with indices taken modulo 8. Each majority is four 2-input
// LUT CLBs (a&b, a|b, c&(a|b), or of the two) placed in one row of the 8x8
// array at columns 0, 1, 3 and 4; columns 2, 5, 6 and 7 of every row are
// spares, so the right-hand edge column is all spares.
// The sequence follows the worked example of the method: CLB 9 fails and
// CLB 10 (its right neighbour) must replace it. Then the replacement itself
// fails, and six more CLBs fail. After every repair all 256 input patterns
// are checked against the filter's definition.
module tb_noise_filter_example;
  import aru_pkg::*;

  localparam int unsigned W = CFG_W;

  logic              clk = 0, rst_n = 0;
  logic              cfg_load = 0;
  logic [W-1:0]      cfg_load_word = '0;
  logic [N_CLB-1:0]  cfg_load_active = '0;
  logic              fault_valid = 0, fault_ready;
  logic [IDX_W-1:0]  fault_clb = '0;
  logic              repair_done;
  repair_result_e    repair_result;
  logic [IDX_W-1:0]  repair_fault, repair_spare;
  logic [$clog2(N_CLB*N_IN+N_PO+1)-1:0] repair_moved;
  logic              lspare_found, rspare_found;
  logic [IDX_W-1:0]  lspare, rspare;
  logic [N_PI-1:0]   pi = '0;
  logic [N_PO-1:0]   po;
  logic [N_CLB-1:0]  clb_defect = '0;
  logic [W-1:0]      cfg_word;
  logic [N_CLB-1:0]  active_map, fault_map, spare_map;
  logic [IDX_W:0]    n_spare;

  blrb_ft_fpga dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_repairs = 0, n_visible = 0;
  int fld [64][2];
  int fn  [64];
  int outs[8];
  bit m_active [64];
  bit m_fault  [64];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [W-1:0] pack();
    logic [W-1:0] w;
    int cur = 0;
    for (int k = 0; k < 64; k++) begin
      for (int j = 0; j < 2; j++) begin w[cur +: 7] = 7'(fld[k][j]); cur += 7; end
      w[cur +: 4] = 4'(fn[k]); cur += 4;
    end
    for (int o = 0; o < 8; o++) begin w[cur +: 7] = 7'(outs[o]); cur += 7; end
    return w;
  endfunction

  function automatic logic [7:0] filter(logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) begin
      automatic int s = int'(x[i]) + int'(x[(i+1)%8]) + int'(x[(i+2)%8]);
      y[i] = (s >= 2);
    end
    return y;
  endfunction

  // every input pattern; returns the number of wrong outputs
  task automatic sweep(output int bad);
    bad = 0;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      pi = 8'(v);
      repeat (4) @(posedge clk);
      #1;
      if (po != filter(pi)) bad++;
    end
  endtask

  function automatic int ref_spare(int f);
    for (int d = 1; d < 64; d++) begin
      if (f - d >= 0 && !m_active[f-d] && !m_fault[f-d]) return f - d;
      if (f + d < 64 && !m_active[f+d] && !m_fault[f+d]) return f + d;
    end
    return -1;
  endfunction

  task automatic fail_and_repair(input int f, input int want);
    int bad, lat, exp_s;
    exp_s = ref_spare(f);
    if (want >= 0) check(exp_s == want, $sformatf("reference spare for %0d is %0d", f, want));
    clb_defect[f] = 1'b1;
    sweep(bad);
    if (bad > 0) n_visible++;
    @(negedge clk);
    fault_valid = 1; fault_clb = 6'(f);
    @(posedge clk);
    @(negedge clk);
    fault_valid = 0;
    lat = 1;
    while (!repair_done && lat < 20) begin @(negedge clk); lat++; end
    check(repair_done && repair_result == RES_REPAIRED && lat == 3,
          $sformatf("repair of %0d (latency %0d)", f, lat));
    check(int'(repair_spare) == exp_s, $sformatf("spare for %0d: got %0d want %0d", f, repair_spare, exp_s));
    m_fault[f] = 1; m_active[f] = 0; m_active[exp_s] = 1;
    sweep(bad);
    check(bad == 0, $sformatf("filter restored after fault on %0d (%0d bad patterns)", f, bad));
    n_repairs++;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int bad;
    // spares everywhere, then one majority per row
    for (int k = 0; k < 64; k++) begin
      fld[k][0] = 0; fld[k][1] = 0; fn[k] = 0; m_active[k] = 0; m_fault[k] = 0;
    end
    for (int r = 0; r < 8; r++) begin
      automatic int a = r, b = (r + 1) % 8, c = (r + 2) % 8;   // primary inputs
      automatic int t_and = r*8 + 0, t_or = r*8 + 1, t_c = r*8 + 3, t_y = r*8 + 4;
      fld[t_and] = '{a, b};            fn[t_and] = 32'b1000;  // a & b
      fld[t_or]  = '{a, b};            fn[t_or]  = 32'b1110;  // a | b
      fld[t_c]   = '{c, 8 + t_or};     fn[t_c]   = 32'b1000;  // c & (a | b)
      fld[t_y]   = '{8 + t_and, 8 + t_c}; fn[t_y] = 32'b1110; // majority
      m_active[t_and] = 1; m_active[t_or] = 1; m_active[t_c] = 1; m_active[t_y] = 1;
      outs[r] = 8 + t_y;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_load = 1; cfg_load_word = pack();
    for (int k = 0; k < 64; k++) cfg_load_active[k] = m_active[k];
    @(negedge clk);
    cfg_load = 0;
    check(int'(n_spare) == 32, "32 spares after load");
    sweep(bad);
    check(bad == 0, "filter correct before any fault");

    fail_and_repair(9, 10);      // the worked example: CLB 9 -> CLB 10
    fail_and_repair(10, -1);     // the replacement fails too
    fail_and_repair(20, 21);     // right-hand neighbour is a spare
    fail_and_repair(36, -1);
    fail_and_repair(59, -1);
    fail_and_repair(0, -1);      // left edge CLB
    fail_and_repair(4, -1);
    fail_and_repair(44, -1);
    check(int'(n_spare) == 32 - n_repairs, "one spare used per repair");

    $display("repairs=%0d visible_before_repair=%0d", n_repairs, n_visible);
    check(n_visible > 0, "a fault corrupted the filter before repair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
