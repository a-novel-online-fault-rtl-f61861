// tb_blrb_ft_fpga: end-to-end test of the fault-tolerant array at full size.
//
// A random feed-forward circuit is placed on the active CLBs of the 64-CLB
// array; about a quarter of the CLBs, always including both edge CLBs, are
// left as spares. Reference outputs are computed by the testbench from the
// original circuit. Then, one at a time, CLBs are damaged (stuck-at-0) and
// reported:
//   - the damage is first shown to corrupt the outputs (when it does),
//   - while the report is analysed, the left and right candidate spares
//     (LSpare, RSpare) are compared with the testbench's own search,
//   - after the report the unit must pick the nearest spare to the left or
//     right (checked against the testbench's own search), finish in 3 clocks,
//     update the active/spare/fault map, report how many connections it
//     moved (counted in the old word by the testbench), and the array must again produce
//     the reference outputs, with the damaged CLBs still damaged.
// Faults are also reported on unused spares (retired, no reconfiguration), on
// CLBs already known faulty, on CLBs that drive a primary output directly,
// and on spares that already replaced an earlier fault; finally spares are
// exhausted so that a fault can no longer be repaired. Each of these events
// is counted and a failure is counted for any that never happened.
module tb_blrb_ft_fpga;
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

  int checks = 0, failures = 0;
  // event counters
  int n_repair_left = 0, n_repair_right = 0, n_retired = 0, n_known = 0;
  int n_both_sides = 0;
  int n_no_spare = 0, n_visible = 0, n_po_moved = 0, n_chain = 0, n_recovered = 0;

  // original circuit, in logical CLB numbers (= physical numbers at load)
  int fld [64][2];
  int fn  [64];
  int outs[8];
  bit m_active [64];
  bit m_fault  [64];
  bit m_moved  [64];  // physical CLB holds a moved function
  int loc      [64];  // physical location of logical CLB l

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

  // reference outputs of the original circuit for input x
  function automatic logic [7:0] golden(logic [7:0] x);
    bit v [64];
    logic [7:0] y;
    foreach (v[i]) v[i] = 0;
    for (int k = 0; k < 64; k++) begin
      if (m_active_at_load[k]) begin
        bit a, b;
        a = (fld[k][0] < 8) ? x[fld[k][0]] : v[fld[k][0] - 8];
        b = (fld[k][1] < 8) ? x[fld[k][1]] : v[fld[k][1] - 8];
        v[k] = fn[k][2*int'(b) + int'(a)];
      end
    end
    for (int o = 0; o < 8; o++) y[o] = (outs[o] < 8) ? x[outs[o]] : v[outs[o] - 8];
    return y;
  endfunction

  bit m_active_at_load [64];

  // apply n random input vectors; count mismatches against the reference
  task automatic run_vectors(input int n, output int mism);
    mism = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      pi = 8'($urandom);
      repeat (66) @(posedge clk);
      #1;
      if (po != golden(pi)) mism++;
    end
  endtask

  // nearest spare by the testbench's own search: returns -1 if none
  function automatic int ref_spare(int f);
    for (int d = 1; d < 64; d++) begin
      if (f - d >= 0 && !m_active[f-d] && !m_fault[f-d]) return f - d;
      if (f + d < 64 && !m_active[f+d] && !m_fault[f+d]) return f + d;
    end
    return -1;
  endfunction

  task automatic report(input int f, output repair_result_e res, output int lat);
    @(negedge clk);
    check(fault_ready, "ready before report");
    fault_valid = 1; fault_clb = 6'(f);
    @(posedge clk);
    @(negedge clk);
    fault_valid = 0;
    // the report is being analysed: check both BLRB candidates
    begin
      int el = -1, er = -1;
      for (int k = 0; k < f; k++)       if (!m_active[k] && !m_fault[k]) el = k;
      for (int k = 63; k > f; k--)      if (!m_active[k] && !m_fault[k]) er = k;
      check(lspare_found == (el >= 0) && (el < 0 || int'(lspare) == el), $sformatf("LSpare of %0d", f));
      check(rspare_found == (er >= 0) && (er < 0 || int'(rspare) == er), $sformatf("RSpare of %0d", f));
      if (el >= 0 && er >= 0) n_both_sides++;
    end
    lat = 1;
    while (!repair_done && lat < 20) begin @(negedge clk); lat++; end
    res = repair_result;
    check(repair_done && int'(repair_fault) == f, "done for the reported CLB");
  endtask

  task automatic compare_maps(input string what);
    bit ok = 1;
    for (int k = 0; k < 64; k++)
      if (active_map[k] != m_active[k] || fault_map[k] != m_fault[k] ||
          spare_map[k] != (!m_active[k] && !m_fault[k])) ok = 0;
    check(ok, {"maps after ", what});
  endtask

  // one fault on physical CLB f, with full checking
  task automatic fault_on(input int f, input bit functional);
    repair_result_e res;
    int lat, mism, exp_s, exp_moved;
    bit was_active = m_active[f], was_faulty = m_fault[f];
    bool_po(f);
    clb_defect[f] = 1'b1;
    if (functional && was_active) begin
      run_vectors(6, mism);
      if (mism > 0) n_visible++;
    end
    exp_s = ref_spare(f);
    exp_moved = 0;
    for (int k = 0; k < 64; k++)
      for (int j = 0; j < 2; j++) exp_moved += int'(int'(cfg_word[k*18 + j*7 +: 7]) == 8 + f);
    for (int o = 0; o < 8; o++) exp_moved += int'(int'(cfg_word[64*18 + o*7 +: 7]) == 8 + f);
    report(f, res, lat);
    if (was_faulty) begin
      check(res == RES_KNOWN && lat == 2, "known fault: no action, 2 clocks");
      n_known++;
    end else if (!was_active) begin
      check(res == RES_RETIRED && lat == 2, "fault on a spare: retired, 2 clocks");
      m_fault[f] = 1; n_retired++;
    end else if (exp_s < 0) begin
      check(res == RES_NO_SPARE && lat == 2, "no spare left, 2 clocks");
      m_fault[f] = 1; m_active[f] = 0; n_no_spare++;
    end else begin
      check(res == RES_REPAIRED && lat == 3,
            $sformatf("repair of %0d: result %s latency %0d", f, res.name(), lat));
      check(int'(repair_spare) == exp_s,
            $sformatf("BLRB spare for %0d: got %0d want %0d", f, repair_spare, exp_s));
      check(int'(repair_moved) == exp_moved,
            $sformatf("connections moved for %0d: got %0d want %0d", f, repair_moved, exp_moved));
      if (exp_s < f) n_repair_left++; else n_repair_right++;
      if (m_moved[f]) n_chain++;
      m_fault[f] = 1; m_active[f] = 0; m_active[exp_s] = 1; m_moved[exp_s] = 1;
      for (int l = 0; l < 64; l++) if (loc[l] == f) begin
        loc[l] = exp_s;
        check(cfg_word[exp_s*18 + 14 +: 4] == 4'(fn[l]), "function bits moved to the spare");
      end
      check(cfg_word[f*18 +: 18] == '0, "faulty record cleared");
      if (functional) begin
        run_vectors(6, mism);
        check(mism == 0, $sformatf("outputs restored after repair of %0d (%0d bad)", f, mism));
        if (mism == 0) n_recovered++;
      end
    end
    compare_maps(res.name());
  endtask

  // count faults on CLBs that drive a primary output directly
  task automatic bool_po(input int f);
    for (int o = 0; o < 8; o++)
      if (int'(cfg_word[64*18 + o*7 +: 7]) == 8 + f && m_active[f]) begin
        n_po_moved++;
        break;
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int mism;
    // build the circuit: spares at both edges and about one CLB in four
    for (int k = 0; k < 64; k++) begin
      m_active[k] = !(k == 0 || k == 63 || ($urandom % 4 == 0));
      m_active_at_load[k] = m_active[k];
      m_fault[k] = 0; m_moved[k] = 0; loc[k] = m_active[k] ? k : -1;
    end
    for (int k = 0; k < 64; k++) begin
      automatic int prev[$];
      for (int i = 0; i < k; i++) if (m_active[i]) prev.push_back(i);
      for (int j = 0; j < 2; j++) begin
        if (!m_active[k])                          fld[k][j] = $urandom % 128;   // spare: junk
        else if (prev.size() == 0 || $urandom % 4 == 0) fld[k][j] = $urandom % 8;
        else fld[k][j] = 8 + prev[prev.size() - 1 - ($urandom % ((prev.size() < 6) ? prev.size() : 6))];
      end
      fn[k] = m_active[k] ? ((($urandom % 2) == 1) ? 6 : 9) ^ (($urandom % 8 == 0) ? 15 : 0) : $urandom % 16;
    end
    // outputs: the last active CLBs
    begin
      automatic int o = 0;
      for (int k = 63; k >= 0 && o < 8; k--) if (m_active[k]) begin outs[o] = 8 + k; o++; end
    end

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_load = 1; cfg_load_word = pack();
    for (int k = 0; k < 64; k++) cfg_load_active[k] = m_active[k];
    @(negedge clk);
    cfg_load = 0;
    check(cfg_word == pack(), "configuration loaded");
    compare_maps("load");
    run_vectors(8, mism);
    check(mism == 0, "fault-free outputs match the reference");

    // phase 1: repairs while spares last, with functional checks
    for (int t = 0; t < 40; t++) begin
      automatic int f, sp = 0;
      for (int k = 0; k < 64; k++) sp += int'(!m_active[k] && !m_fault[k]);
      if (sp < 3) break;
      case (t % 8)
        3: begin  // an unused spare fails
             f = -1;
             for (int k = 0; k < 64; k++) if (!m_active[k] && !m_fault[k] && $urandom % 3 == 0) f = k;
             if (f < 0) f = ref_spare(32);
           end
        5: begin  // a CLB that already replaced an earlier fault
             f = -1;
             for (int k = 0; k < 64; k++) if (m_moved[k] && m_active[k]) f = k;
             if (f < 0) f = $urandom % 64;
           end
        6: begin  // a CLB already known faulty
             f = -1;
             for (int k = 0; k < 64; k++) if (m_fault[k]) f = k;
             if (f < 0) f = $urandom % 64;
           end
        7: begin  // a CLB that drives a primary output
             f = int'(cfg_word[64*18 + ($urandom % 8)*7 +: 7]) - 8;
             if (f < 0 || f > 63) f = $urandom % 64;
           end
        default: begin
             do f = $urandom % 64; while (!m_active[f]);
           end
      endcase
      fault_on(f, 1'b1);
    end

    // phase 2: use up every spare, then fail once more
    for (int t = 0; t < 64; t++) begin
      automatic int f;
      if (ref_spare(32) < 0 && t > 0) break;
      do f = $urandom % 64; while (!m_active[f]);
      fault_on(f, 1'b0);
    end
    run_vectors(4, mism);
    check(mism == 0, "outputs still correct with every spare used");
    begin
      automatic int f;
      do f = $urandom % 64; while (!m_active[f]);
      fault_on(f, 1'b0);
    end

    $display("events: left=%0d right=%0d retired=%0d known=%0d no_spare=%0d visible=%0d po_moved=%0d chained=%0d recovered=%0d",
             n_repair_left, n_repair_right, n_retired, n_known, n_no_spare, n_visible,
             n_po_moved, n_chain, n_recovered);
    check(n_repair_left > 0,  "repair with a left spare happened");
    check(n_repair_right > 0, "repair with a right spare happened");
    check(n_retired > 0,      "spare retirement happened");
    check(n_known > 0,        "repeated fault report happened");
    check(n_no_spare > 0,     "spare exhaustion happened");
    check(n_visible > 0,      "a fault corrupted the outputs before repair");
    check(n_po_moved > 0,     "a primary-output connection was moved");
    check(n_chain > 0,        "a replacement CLB was itself replaced");
    check(n_recovered > 0,    "outputs recovered after repair");
    check(n_both_sides > 0,   "faults with spares on both sides");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
