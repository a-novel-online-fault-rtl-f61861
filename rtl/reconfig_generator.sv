// reconfig_generator: builds the reconfigured configuration word.
//
// Given the current configuration word, the faulty CLB f and the chosen spare
// s, it produces the word in which s does the work of f:
//   1. f's input numbers are decoded to CLB numbers (Equation 1),
//   2. a new input field is generated for s from them (CF + CLB number;
//      primary-input numbers are kept; a reference of f to itself becomes s),
//   3. f's function bits and the new input fields are written at s's record,
//   4. every CLB input and primary-output selector that read f is rewritten
//      to read s, so the rest of the circuit is connected to the spare,
//   5. f's record is cleared (inputs 0, function 0: constant-0 output).
// fanout reports how many connections were moved in step 4.
//
// Purely combinational; the controller registers the result in one clock.
// Steps 1-3 follow the described method. Step 4 is how this design makes the
// structural connection of the faulty CLB to the spare; step 5 is its own.
module reconfig_generator
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
  localparam int unsigned W      = P_N_CLB * REC + P_N_PO * P_IN_W,
  localparam int unsigned CNT_W  = $clog2(P_N_CLB * P_N_IN + P_N_PO + 1)
) (
  input  logic [W-1:0]        cfg_word,
  input  logic [P_IDX_W-1:0]  fault_idx,
  input  logic [P_IDX_W-1:0]  spare_idx,
  output logic [W-1:0]        new_word,
  output logic [CNT_W-1:0]    fanout
);

  logic [P_N_CLB-1:0][P_LUT_W-1:0]             func;
  logic [P_N_CLB-1:0][P_N_IN-1:0][P_IN_W-1:0]  in_num;
  logic [P_N_CLB-1:0][P_N_IN-1:0]              in_is_clb;
  logic [P_N_CLB-1:0][P_N_IN-1:0][P_IDX_W-1:0] in_clb;
  logic [P_N_PO-1:0][P_IN_W-1:0]               out_num;
  logic [P_N_PO-1:0]                           out_is_clb;
  logic [P_N_PO-1:0][P_IDX_W-1:0]              out_clb;
  logic [P_N_CLB-1:0][P_N_IN-1:0]              in_hit;
  logic [P_N_PO-1:0]                           out_hit;

  config_decoder #(
    .P_N_CLB(P_N_CLB), .P_N_PO(P_N_PO), .P_N_IN(P_N_IN), .P_LUT_W(P_LUT_W),
    .P_IN_W(P_IN_W), .P_IDX_W(P_IDX_W), .P_CF(P_CF)
  ) u_sep (
    .cfg_word, .func, .in_num, .in_is_clb, .in_clb, .out_num, .out_is_clb, .out_clb
  );

  interconnect_identifier #(
    .P_N_CLB(P_N_CLB), .P_N_PO(P_N_PO), .P_N_IN(P_N_IN), .P_IDX_W(P_IDX_W)
  ) u_ident (
    .in_is_clb, .in_clb, .out_is_clb, .out_clb, .target(fault_idx),
    .in_hit, .out_hit, .fanout, .used()
  );

  // Equation 1, encoding direction
  function automatic logic [P_IN_W-1:0] encode(input logic [P_IDX_W-1:0] clb);
    return P_IN_W'(P_CF) + P_IN_W'(clb);
  endfunction

  logic [P_IN_W-1:0] spare_num;
  logic [REC-1:0]    spare_rec;

  always_comb begin
    spare_num = encode(spare_idx);

    // steps 1-3: record of the spare
    spare_rec = '0;
    spare_rec[P_N_IN*P_IN_W +: P_LUT_W] = func[fault_idx];
    for (int j = 0; j < P_N_IN; j++) begin
      if (in_is_clb[fault_idx][j])
        spare_rec[j*P_IN_W +: P_IN_W] = (in_clb[fault_idx][j] == fault_idx)
                                        ? spare_num : encode(in_clb[fault_idx][j]);
      else
        spare_rec[j*P_IN_W +: P_IN_W] = in_num[fault_idx][j];
    end

    new_word = cfg_word;
    // step 4: move every connection that read the faulty CLB
    for (int k = 0; k < P_N_CLB; k++)
      for (int j = 0; j < P_N_IN; j++)
        if (in_hit[k][j]) new_word[k*REC + j*P_IN_W +: P_IN_W] = spare_num;
    for (int o = 0; o < P_N_PO; o++)
      if (out_hit[o]) new_word[P_N_CLB*REC + o*P_IN_W +: P_IN_W] = spare_num;
    // steps 3 and 5
    new_word[spare_idx*REC +: REC] = spare_rec;
    new_word[fault_idx*REC +: REC] = '0;
  end

endmodule
