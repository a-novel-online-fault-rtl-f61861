// tb_aru_controller: checks the restructuring sequence and its timing.
//
// Sends fault reports for each of the four situations (known fault, unused
// CLB, active CLB with a spare, active CLB without one) in random order and
// checks, clock by clock, when the report is taken, which map update and
// configuration write are issued, and when done arrives with which result:
// 2 clocks after the report for the three cases without reconfiguration,
// 3 clocks for a repair, with the configuration write in the clock before done.
module tb_aru_controller;
  import aru_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              fault_valid = 0, fault_ready;
  logic [IDX_W-1:0]  fault_clb = '0;
  logic              is_active = 0, is_faulty = 0, spare_found = 0;
  logic [IDX_W-1:0]  spare_best = '0;
  logic [IDX_W-1:0]  fault_idx, spare_idx;
  logic              cfg_we, st_retire, st_repair, done;
  repair_result_e    result;

  aru_controller dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen [4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic int kind = $urandom % 4;
      automatic int f = $urandom % 64, s = $urandom % 64;
      automatic int lat = 0, we_at = -1, upd_at = -1;
      automatic bit retired = 0, repaired = 0;
      automatic repair_result_e exp_r;
      @(negedge clk);
      check(fault_ready, "ready when idle");
      fault_valid = 1; fault_clb = 6'(f);
      is_faulty   = (kind == 0);
      is_active   = (kind >= 2);
      spare_found = (kind == 2);
      spare_best  = 6'(s);
      @(posedge clk);            // report taken here
      @(negedge clk);
      fault_valid = 0; fault_clb = 6'($urandom);
      check(!fault_ready && fault_idx == 6'(f), "report latched, busy");
      while (!done && lat < 10) begin
        if (cfg_we) we_at = lat;
        if (st_retire) begin retired = 1; upd_at = lat; end
        if (st_repair) begin repaired = 1; upd_at = lat; end
        if (lat > 0) spare_best = 6'($urandom);  // latched by now
        @(negedge clk);
        lat++;
      end
      lat++;  // count in clocks from the edge that took the report
      case (kind)
        0: exp_r = RES_KNOWN;
        1: exp_r = RES_RETIRED;
        2: exp_r = RES_REPAIRED;
        default: exp_r = RES_NO_SPARE;
      endcase
      seen[kind]++;
      check(done && result == exp_r, $sformatf("result %s want %s", result.name(), exp_r.name()));
      check(lat == ((kind == 2) ? 3 : 2), $sformatf("latency %0d kind %0d", lat, kind));
      check(retired == (kind == 1 || kind == 3), "retire issued");
      check(repaired == (kind == 2), "repair issued");
      if (kind == 2) begin
        check(we_at == 1 && upd_at == 1, "write and map update in the same clock");
        check(spare_idx == 6'(s), "spare latched");
      end else
        check(we_at < 0, "no configuration write");
      @(negedge clk);
      check(!done && fault_ready, "done is one clock");
    end
    check(seen[0] > 0 && seen[1] > 0 && seen[2] > 0 && seen[3] > 0, "all situations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
