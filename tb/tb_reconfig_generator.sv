// tb_reconfig_generator: checks the reconfigured configuration word.
//
// Builds random configuration words as field tables (input numbers biased
// towards a few CLBs so that the faulty CLB has many readers, with some
// primary-input and out-of-range numbers), picks a faulty CLB and a spare, and
// computes the expected word from the tables: readers of the faulty CLB now
// read the spare, the spare carries the faulty CLB's function and inputs (a
// self-reference turned into the spare), the faulty record is zero, all else
// unchanged. Also checks the reported number of moved connections.
module tb_reconfig_generator;
  import aru_pkg::*;

  localparam int unsigned W = CFG_W;

  logic [W-1:0]       cfg_word, new_word;
  logic [IDX_W-1:0]   fault_idx, spare_idx;
  logic [$clog2(N_CLB*N_IN+N_PO+1)-1:0] fanout;

  reconfig_generator dut (.*);

  int checks = 0, failures = 0;
  int n_moved = 0, n_out_moved = 0, n_self = 0;
  int fld [64][2];
  int fn  [64];
  int outs[8];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
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

  function automatic int rnd_num(int hot);
    int r = $urandom % 20;
    if (r < 5)  return $urandom % 8;              // primary input
    if (r < 9)  return 8 + hot;                   // the faulty CLB
    if (r < 18) return 8 + ($urandom % 64);       // any CLB
    return 72 + ($urandom % 56);                  // names nothing
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic int f = $urandom % 64;
      automatic int s = (f + 1 + $urandom % 63) % 64;
      automatic int cnt = 0;
      automatic logic [W-1:0] exp_w;
      for (int k = 0; k < 64; k++) begin
        for (int j = 0; j < 2; j++) fld[k][j] = rnd_num(f);
        fn[k] = $urandom % 16;
      end
      for (int o = 0; o < 8; o++) outs[o] = rnd_num(f);
      if (t % 7 == 0) fld[f][1] = 8 + f;  // self-reference of the faulty CLB
      cfg_word = pack();
      fault_idx = 6'(f); spare_idx = 6'(s);
      #1;
      // expected tables
      for (int k = 0; k < 64; k++)
        for (int j = 0; j < 2; j++)
          if (fld[k][j] == 8 + f) begin
            cnt++;
            if (k != f) fld[k][j] = 8 + s;
          end
      for (int o = 0; o < 8; o++)
        if (outs[o] == 8 + f) begin cnt++; outs[o] = 8 + s; n_out_moved++; end
      for (int j = 0; j < 2; j++) begin
        if (fld[f][j] == 8 + f) begin fld[s][j] = 8 + s; n_self++; end
        else fld[s][j] = fld[f][j];
        fld[f][j] = 0;
      end
      fn[s] = fn[f]; fn[f] = 0;
      exp_w = pack();
      n_moved += cnt;
      check(new_word == exp_w, $sformatf("new word, fault %0d spare %0d", f, s));
      check(int'(fanout) == cnt, $sformatf("fanout %0d want %0d", fanout, cnt));
    end
    check(n_moved > 0 && n_out_moved > 0 && n_self > 0, "all rewrites exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
