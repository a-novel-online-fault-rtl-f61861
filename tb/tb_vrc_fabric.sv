// tb_vrc_fabric: checks the array against a software evaluation.
//
// Each round builds a random feed-forward circuit over the 64 CLBs: a random
// evaluation order is drawn, and each CLB reads primary inputs or CLBs earlier
// in that order (so CLB numbers need not increase along a path), plus some
// out-of-range input numbers that must read as 0. Primary outputs select any
// source. Random damage (stuck-at-0 CLBs) is applied in some rounds. After
// holding the inputs for 66 clocks (longer than any path) every CLB output
// and primary output is compared with the evaluation done by the testbench.
module tb_vrc_fabric;
  import aru_pkg::*;

  localparam int unsigned W = CFG_W;

  logic              clk = 0, rst_n = 0;
  logic [W-1:0]      cfg_word = '0;
  logic [N_PI-1:0]   pi = '0;
  logic [N_CLB-1:0]  clb_defect = '0;
  logic [N_PO-1:0]   po;
  logic [N_CLB-1:0]  clb_out;

  vrc_fabric dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_defect_rounds = 0, n_ones = 0;
  int fld [64][2];
  int fn  [64];
  int outs[8];
  int order[64];

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

  function automatic bit src_val(int num, bit v[64]);
    if (num < 8)  return pi[num];
    if (num < 72) return v[num - 8];
    return 0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      // random evaluation order
      for (int i = 0; i < 64; i++) order[i] = i;
      for (int i = 63; i > 0; i--) begin
        automatic int j = $urandom % (i + 1);
        automatic int tmp = order[i];
        order[i] = order[j]; order[j] = tmp;
      end
      for (int i = 0; i < 64; i++) begin
        automatic int k = order[i];
        for (int j = 0; j < 2; j++) begin
          automatic int c = $urandom % 10;
          if (i == 0 || c < 3) fld[k][j] = $urandom % 8;
          else if (c < 9)      fld[k][j] = 8 + order[$urandom % i];
          else                 fld[k][j] = 72 + $urandom % 56;
        end
        fn[k] = $urandom % 16;
      end
      for (int o = 0; o < 8; o++) outs[o] = (o == 0) ? 3 : 8 + order[63 - o];
      clb_defect = (r % 2 == 1) ? ({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom}) : '0;
      if (r % 2 == 1) n_defect_rounds++;
      cfg_word = pack();
      for (int v = 0; v < 10; v++) begin
        automatic bit val [64];
        @(negedge clk);
        pi = 8'($urandom);
        repeat (66) @(posedge clk);
        #1;
        foreach (val[i]) val[i] = 0;
        for (int i = 0; i < 64; i++) begin
          automatic int k = order[i];
          automatic bit a = src_val(fld[k][0], val);
          automatic bit b = src_val(fld[k][1], val);
          val[k] = clb_defect[k] ? 0 : fn[k][2*int'(b) + int'(a)];
        end
        for (int k = 0; k < 64; k++) begin
          check(clb_out[k] == val[k], $sformatf("clb %0d round %0d", k, r));
          n_ones += int'(val[k]);
        end
        for (int o = 0; o < 8; o++)
          check(po[o] == src_val(outs[o], val), $sformatf("po %0d round %0d", o, r));
      end
    end
    check(n_defect_rounds > 0 && n_ones > 100, "damage and both values exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
