// interconnect_identifier: structural connections of one CLB.
//
// Given the decoded configuration (from config_decoder) and a target CLB
// number, marks every CLB input and every primary output whose input number
// refers to the target (its fan-out), counts them, and also reports for every
// CLB whether anything at all reads it (the "used" map of the whole
// structure). The restructuring unit uses the fan-out to move the target's
// connections to its replacement.
//
// Purely combinational. Identifying which CLB each input is connected to
// follows the described method; the outputs and their form are this design's.
module interconnect_identifier
  import aru_pkg::*;
#(
  parameter int unsigned P_N_CLB = N_CLB,
  parameter int unsigned P_N_PO  = N_PO,
  parameter int unsigned P_N_IN  = N_IN,
  parameter int unsigned P_IDX_W = IDX_W,
  localparam int unsigned CNT_W  = $clog2(P_N_CLB * P_N_IN + P_N_PO + 1)
) (
  input  logic [P_N_CLB-1:0][P_N_IN-1:0]              in_is_clb,
  input  logic [P_N_CLB-1:0][P_N_IN-1:0][P_IDX_W-1:0] in_clb,
  input  logic [P_N_PO-1:0]                           out_is_clb,
  input  logic [P_N_PO-1:0][P_IDX_W-1:0]              out_clb,
  input  logic [P_IDX_W-1:0]                          target,
  output logic [P_N_CLB-1:0][P_N_IN-1:0]              in_hit,     // CLB k input j reads target
  output logic [P_N_PO-1:0]                           out_hit,    // output o reads target
  output logic [CNT_W-1:0]                            fanout,     // number of hits
  output logic [P_N_CLB-1:0]                          used        // CLB k is read by something
);

  always_comb begin
    fanout = '0;
    used   = '0;
    for (int k = 0; k < P_N_CLB; k++) begin
      for (int j = 0; j < P_N_IN; j++) begin
        in_hit[k][j] = in_is_clb[k][j] && (in_clb[k][j] == target);
        fanout       = fanout + CNT_W'(in_hit[k][j]);
        if (in_is_clb[k][j]) used[in_clb[k][j]] = 1'b1;
      end
    end
    for (int o = 0; o < P_N_PO; o++) begin
      out_hit[o] = out_is_clb[o] && (out_clb[o] == target);
      fanout     = fanout + CNT_W'(out_hit[o]);
      if (out_is_clb[o]) used[out_clb[o]] = 1'b1;
    end
  end

endmodule
