// tb_spare_selector: checks the BLRB choice against a distance search.
//
// For random spare maps of several densities (including none and one spare)
// and every faulty CLB position, the testbench finds the nearest spare on
// each side by stepping outwards from the fault and compares LSpare, RSpare,
// their distances and the chosen spare (nearer one, left on a tie).
module tb_spare_selector;
  import aru_pkg::*;

  logic [N_CLB-1:0]  spare;
  logic [IDX_W-1:0]  fault_idx;
  logic              l_found, r_found, found, pick_right;
  logic [IDX_W-1:0]  l_spare, r_spare, l_dist, r_dist, best;

  spare_selector dut (.*);

  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_tie = 0, n_none = 0;

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
    for (int t = 0; t < 60; t++) begin
      case (t % 6)
        0: spare = '0;
        1: spare = 64'(1) << ($urandom % 64);
        2: spare = {$urandom, $urandom};
        3: spare = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        4: spare = 64'h8000_0000_0000_0001 | (64'(1) << ($urandom % 64));  // edge spares
        default: spare = 64'h0101_0101_0101_0101 << ($urandom % 8);
      endcase
      for (int f = 0; f < 64; f++) begin
        automatic int ld = -1, rd = -1, exp_best;
        fault_idx = 6'(f);
        #1;
        for (int d = 1; d < 64 && ld < 0; d++) if (f - d >= 0 && spare[f-d]) ld = d;
        for (int d = 1; d < 64 && rd < 0; d++) if (f + d < 64 && spare[f+d]) rd = d;
        check(l_found == (ld > 0) && r_found == (rd > 0), $sformatf("found f=%0d", f));
        if (ld > 0) check(int'(l_spare) == f - ld && int'(l_dist) == ld, $sformatf("LSpare f=%0d", f));
        if (rd > 0) check(int'(r_spare) == f + rd && int'(r_dist) == rd, $sformatf("RSpare f=%0d", f));
        check(found == (ld > 0 || rd > 0), "found");
        if (ld < 0 && rd < 0) n_none++;
        else begin
          if (rd > 0 && (ld < 0 || rd < ld)) begin exp_best = f + rd; n_right++; end
          else begin exp_best = f - ld; n_left++; if (ld == rd) n_tie++; end
          check(int'(best) == exp_best, $sformatf("best f=%0d got %0d want %0d", f, best, exp_best));
          check(pick_right == (exp_best > f), "side");
        end
      end
    end
    check(n_left > 0 && n_right > 0 && n_tie > 0 && n_none > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
