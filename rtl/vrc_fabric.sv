// vrc_fabric: the reconfigurable array the configuration word programs.
//
// N_CLB logic blocks, each a 2-input look-up table followed by a flip-flop.
// Every input of a CLB, and every primary output, is taken from a source
// chosen by an input number in the configuration word: a primary input
// (number < CF) or the registered output of any CLB (CF + CLB number).
// Because every CLB output is registered, any connection pattern is legal;
// a feed-forward circuit of depth d gives its settled outputs d clocks after
// its inputs last changed. A truth table is indexed by {in[1], in[0]}.
//
// clb_defect models physical damage: a CLB whose bit is set holds its output
// at 0 whatever its configuration (stuck-at-0). The restructuring unit learns
// of it only through a fault report.
//
// The array of 64 CLBs arranged 8x8 and programmed by a configuration word
// follows the described system; the CLB contents (2-input LUT plus
// flip-flop), the routing by input numbers and the stuck-at-0 damage model
// are this design's own choices.
module vrc_fabric
  import aru_pkg::*;
#(
  parameter int unsigned P_N_CLB = N_CLB,
  parameter int unsigned P_N_PI  = N_PI,
  parameter int unsigned P_N_PO  = N_PO,
  parameter int unsigned P_N_IN  = N_IN,
  parameter int unsigned P_LUT_W = LUT_W,
  parameter int unsigned P_IN_W  = IN_W,
  parameter int unsigned P_IDX_W = IDX_W,
  parameter int unsigned P_CF    = CF,
  localparam int unsigned REC    = P_N_IN * P_IN_W + P_LUT_W,
  localparam int unsigned W      = P_N_CLB * REC + P_N_PO * P_IN_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        cfg_word,
  input  logic [P_N_PI-1:0]   pi,
  input  logic [P_N_CLB-1:0]  clb_defect,
  output logic [P_N_PO-1:0]   po,
  output logic [P_N_CLB-1:0]  clb_out
);

  logic [P_N_CLB-1:0][P_LUT_W-1:0]             func;
  logic [P_N_CLB-1:0][P_N_IN-1:0][P_IN_W-1:0]  in_num;
  logic [P_N_CLB-1:0][P_N_IN-1:0]              in_is_clb;
  logic [P_N_CLB-1:0][P_N_IN-1:0][P_IDX_W-1:0] in_clb;
  logic [P_N_PO-1:0][P_IN_W-1:0]               out_num;
  logic [P_N_PO-1:0]                           out_is_clb;
  logic [P_N_PO-1:0][P_IDX_W-1:0]              out_clb;

  config_decoder #(
    .P_N_CLB(P_N_CLB), .P_N_PO(P_N_PO), .P_N_IN(P_N_IN), .P_LUT_W(P_LUT_W),
    .P_IN_W(P_IN_W), .P_IDX_W(P_IDX_W), .P_CF(P_CF)
  ) u_sep (
    .cfg_word, .func, .in_num, .in_is_clb, .in_clb, .out_num, .out_is_clb, .out_clb
  );

  // value of a source: registered CLB output, primary input or constant 0
  function automatic logic source(input logic                is_clb,
                                  input logic [P_IDX_W-1:0]  clb,
                                  input logic [P_IN_W-1:0]   num,
                                  input logic [P_N_CLB-1:0]  q,
                                  input logic [P_N_PI-1:0]   x);
    if (is_clb)                         return q[clb];
    else if (num < P_IN_W'(P_N_PI))     return x[num[$clog2(P_N_PI)-1:0]];
    else                                return 1'b0;
  endfunction

  logic [P_N_CLB-1:0] next_q;

  always_comb begin
    for (int k = 0; k < P_N_CLB; k++) begin
      logic [P_N_IN-1:0] sel;
      for (int j = 0; j < P_N_IN; j++)
        sel[j] = source(in_is_clb[k][j], in_clb[k][j], in_num[k][j], clb_out, pi);
      next_q[k] = clb_defect[k] ? 1'b0 : func[k][sel];
    end
    for (int o = 0; o < P_N_PO; o++)
      po[o] = source(out_is_clb[o], out_clb[o], out_num[o], clb_out, pi);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clb_out <= '0;
    else        clb_out <= next_q;
  end

endmodule
