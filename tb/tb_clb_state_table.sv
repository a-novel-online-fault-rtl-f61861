// tb_clb_state_table: checks load, retire and repair updates of the
// active/spare/fault map against a model kept in the testbench, and the
// spare and fault counts.
module tb_clb_state_table;
  import aru_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              load = 0, retire = 0, repair = 0;
  logic [N_CLB-1:0]  load_active = '0, load_fault = '0;
  logic [IDX_W-1:0]  fault_idx = '0, spare_idx = '0;
  logic [N_CLB-1:0]  active, fault, spare;
  logic [IDX_W:0]    n_spare, n_fault;

  clb_state_table dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_load = 0, n_retire = 0, n_repair = 0;
  logic [N_CLB-1:0] m_active = '0, m_fault = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic compare();
    int ns = 0, nf = 0;
    for (int k = 0; k < 64; k++) begin
      ns += int'(!m_active[k] && !m_fault[k]);
      nf += int'(m_fault[k]);
    end
    check(active == m_active, "active map");
    check(fault == m_fault, "fault map");
    check(spare == (~m_active & ~m_fault), "spare map");
    check(int'(n_spare) == ns && int'(n_fault) == nf, "counts");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 compare();  // reset value: all zero
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      automatic int op = $urandom % 8;
      @(negedge clk);
      load = 0; retire = 0; repair = 0;
      fault_idx = 6'($urandom); spare_idx = 6'($urandom);
      if (op == 0 || t == 0) begin
        load = 1;
        load_active = {$urandom, $urandom};
        load_fault  = {$urandom, $urandom} & {$urandom, $urandom} & ~load_active;
        m_active = load_active; m_fault = load_fault; n_load++;
      end else if (op < 4) begin
        retire = 1;
        m_fault[fault_idx] = 1; m_active[fault_idx] = 0; n_retire++;
      end else if (op < 7) begin
        repair = 1;
        m_fault[fault_idx] = 1; m_active[fault_idx] = 0; m_active[spare_idx] = 1; n_repair++;
      end
      if (op == 7) begin  // load wins over the other two
        load = 1; repair = 1; retire = 1;
        load_active = {$urandom, $urandom}; load_fault = '0;
        m_active = load_active; m_fault = '0; n_load++;
      end
      @(posedge clk);
      #1 compare();
    end
    check(n_load > 0 && n_retire > 0 && n_repair > 0, "all operations used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
