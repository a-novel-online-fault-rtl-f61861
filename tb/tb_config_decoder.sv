// tb_config_decoder: checks field separation and Equation-1 decoding.
//
// Fills the configuration word with random bits, then walks through it with a
// bit cursor (CLB records in order: input 0, input 1, function; then the
// output selectors) and compares every field the decoder reports. Input
// numbers are classified independently: below 8 a primary input, 8..71 CLB
// (number - 8), 72 and above nothing.
module tb_config_decoder;
  import aru_pkg::*;

  localparam int unsigned W = CFG_W;

  logic [W-1:0]                           cfg_word;
  logic [N_CLB-1:0][LUT_W-1:0]            func;
  logic [N_CLB-1:0][N_IN-1:0][IN_W-1:0]   in_num;
  logic [N_CLB-1:0][N_IN-1:0]             in_is_clb;
  logic [N_CLB-1:0][N_IN-1:0][IDX_W-1:0]  in_clb;
  logic [N_PO-1:0][IN_W-1:0]              out_num;
  logic [N_PO-1:0]                        out_is_clb;
  logic [N_PO-1:0][IDX_W-1:0]             out_clb;

  config_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_pi = 0, n_clb = 0, n_none = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // take n bits at the cursor
  function automatic int take(ref int cur, input int n);
    int v = 0;
    for (int b = 0; b < n; b++) v |= int'(cfg_word[cur + b]) << b;
    cur += n;
    return v;
  endfunction

  task automatic check_ref(input int num, input logic is_clb, input int clb, input string what);
    if (num < 8) begin
      check(!is_clb, what); n_pi++;
    end else if (num < 72) begin
      check(is_clb && clb == num - 8, what); n_clb++;
    end else begin
      check(!is_clb, what); n_none++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      automatic int cur = 0;
      for (int b = 0; b < W; b++) cfg_word[b] = 1'($urandom);
      #1;
      for (int k = 0; k < 64; k++) begin
        for (int j = 0; j < 2; j++) begin
          automatic int v = take(cur, 7);
          check(in_num[k][j] == 7'(v), $sformatf("in_num %0d.%0d", k, j));
          check_ref(v, in_is_clb[k][j], int'(in_clb[k][j]), $sformatf("in decode %0d.%0d", k, j));
        end
        check(func[k] == 4'(take(cur, 4)), $sformatf("func %0d", k));
      end
      for (int o = 0; o < 8; o++) begin
        automatic int v = take(cur, 7);
        check(out_num[o] == 7'(v), $sformatf("out_num %0d", o));
        check_ref(v, out_is_clb[o], int'(out_clb[o]), $sformatf("out decode %0d", o));
      end
      check(cur == W, "word length");
    end
    check(n_pi > 0 && n_clb > 0 && n_none > 0, "all three kinds of input number seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
