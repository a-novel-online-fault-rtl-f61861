// tb_interconnect_identifier: checks fan-out and "used" map of the structure.
//
// Random connection tables (with a bias towards a few CLBs so that fan-outs
// above one occur) are applied for every possible target; the expected hits,
// fan-out count and used map are computed by the testbench with its own loops.
module tb_interconnect_identifier;
  import aru_pkg::*;

  logic [N_CLB-1:0][N_IN-1:0]             in_is_clb;
  logic [N_CLB-1:0][N_IN-1:0][IDX_W-1:0]  in_clb;
  logic [N_PO-1:0]                        out_is_clb;
  logic [N_PO-1:0][IDX_W-1:0]             out_clb;
  logic [IDX_W-1:0]                       target;
  logic [N_CLB-1:0][N_IN-1:0]             in_hit;
  logic [N_PO-1:0]                        out_hit;
  logic [$clog2(N_CLB*N_IN+N_PO+1)-1:0]   fanout;
  logic [N_CLB-1:0]                       used;

  interconnect_identifier dut (.*);

  int checks = 0, failures = 0, max_fanout = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10; t++) begin
      automatic bit exp_used [64];
      foreach (exp_used[i]) exp_used[i] = 0;
      for (int k = 0; k < 64; k++)
        for (int j = 0; j < 2; j++) begin
          in_is_clb[k][j] = ($urandom % 4) != 0;
          in_clb[k][j]    = (t % 2 == 1) ? 6'($urandom % 8) : 6'($urandom);
          if (in_is_clb[k][j]) exp_used[in_clb[k][j]] = 1;
        end
      for (int o = 0; o < 8; o++) begin
        out_is_clb[o] = ($urandom % 4) != 0;
        out_clb[o]    = 6'($urandom % 16);
        if (out_is_clb[o]) exp_used[out_clb[o]] = 1;
      end
      for (int f = 0; f < 64; f++) begin
        automatic int cnt = 0;
        automatic bit ok = 1;
        target = 6'(f);
        #1;
        for (int k = 0; k < 64; k++)
          for (int j = 0; j < 2; j++) begin
            automatic bit e = in_is_clb[k][j] && (int'(in_clb[k][j]) == f);
            if (in_hit[k][j] != e) ok = 0;
            cnt += int'(e);
          end
        for (int o = 0; o < 8; o++) begin
          automatic bit e = out_is_clb[o] && (int'(out_clb[o]) == f);
          if (out_hit[o] != e) ok = 0;
          cnt += int'(e);
        end
        check(ok, $sformatf("hits, target %0d", f));
        check(int'(fanout) == cnt, $sformatf("fanout %0d, target %0d", fanout, f));
        if (cnt > max_fanout) max_fanout = cnt;
      end
      for (int k = 0; k < 64; k++) check(used[k] == exp_used[k], $sformatf("used %0d", k));
    end
    check(max_fanout > 4, "large fan-out exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
