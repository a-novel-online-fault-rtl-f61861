// config_decoder: bit separation and input-number decoding.
//
// Splits the flat configuration word into the fields of every CLB (its input
// numbers and its truth-table function bits) and the selectors of the primary
// outputs, then decodes every input number with Equation 1
// (input number = CF + CLB number): a number below CF names primary input
// <number>, a number CF..CF+N_CLB-1 names CLB <number - CF>, anything larger
// names nothing (the fabric reads it as constant 0).
//
// Purely combinational. Separating the word by inputs, outputs and functions
// and the correcting-factor relation follow the described method; the field
// layout (see aru_pkg) is this design's choice.
module config_decoder
  import aru_pkg::*;
#(
  parameter int unsigned P_N_CLB = N_CLB,
  parameter int unsigned P_N_PO  = N_PO,
  parameter int unsigned P_N_IN  = N_IN,
  parameter int unsigned P_LUT_W = LUT_W,
  parameter int unsigned P_IN_W  = IN_W,
  parameter int unsigned P_IDX_W = IDX_W,
  parameter int unsigned P_CF    = CF,
  localparam int unsigned REC    = P_N_IN * P_IN_W + P_LUT_W,
  localparam int unsigned W      = P_N_CLB * REC + P_N_PO * P_IN_W
) (
  input  logic [W-1:0]                                cfg_word,
  // per-CLB fields
  output logic [P_N_CLB-1:0][P_LUT_W-1:0]             func,
  output logic [P_N_CLB-1:0][P_N_IN-1:0][P_IN_W-1:0]  in_num,
  output logic [P_N_CLB-1:0][P_N_IN-1:0]              in_is_clb,
  output logic [P_N_CLB-1:0][P_N_IN-1:0][P_IDX_W-1:0] in_clb,
  // primary-output selectors
  output logic [P_N_PO-1:0][P_IN_W-1:0]               out_num,
  output logic [P_N_PO-1:0]                           out_is_clb,
  output logic [P_N_PO-1:0][P_IDX_W-1:0]              out_clb
);

  localparam logic [P_IN_W-1:0] CF_V   = P_IN_W'(P_CF);
  localparam logic [P_IN_W:0]   LIMIT  = (P_IN_W+1)'(P_CF + P_N_CLB);

  function automatic logic refers_clb(input logic [P_IN_W-1:0] num);
    return (num >= CF_V) && ({1'b0, num} < LIMIT);
  endfunction

  always_comb begin
    for (int k = 0; k < P_N_CLB; k++) begin
      func[k] = cfg_word[k*REC + P_N_IN*P_IN_W +: P_LUT_W];
      for (int j = 0; j < P_N_IN; j++) begin
        in_num[k][j]    = cfg_word[k*REC + j*P_IN_W +: P_IN_W];
        in_is_clb[k][j] = refers_clb(in_num[k][j]);
        in_clb[k][j]    = P_IDX_W'(in_num[k][j] - CF_V);
      end
    end
    for (int o = 0; o < P_N_PO; o++) begin
      out_num[o]    = cfg_word[P_N_CLB*REC + o*P_IN_W +: P_IN_W];
      out_is_clb[o] = refers_clb(out_num[o]);
      out_clb[o]    = P_IDX_W'(out_num[o] - CF_V);
    end
  end

endmodule
