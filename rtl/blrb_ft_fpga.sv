// blrb_ft_fpga: reconfigurable array with online, nearest-spare fault repair.
//
// The array (vrc_fabric) runs the circuit held in the configuration register.
// Some of its CLBs are left unused as spares; the active-spare word loaded
// with the configuration says which. When a fault report names a CLB, the
// autonomous restructuring unit
//   - separates the configuration word into per-CLB fields and decodes the
//     connections (config_decoder, interconnect_identifier),
//   - looks for the nearest spare to the left and to the right of the faulty
//     CLB and takes the nearer (spare_selector, BLRB rule),
//   - builds the reconfigured word: the spare gets the faulty CLB's function
//     and inputs, everything that read the faulty CLB now reads the spare
//     (reconfig_generator),
//   - writes that word into the configuration register in one clock while the
//     array keeps running, and updates the active/spare/fault map
//     (clb_state_table), all sequenced by aru_controller.
// A fault on an unused CLB only removes it from the spare pool.
//
// Interface: load a configuration with cfg_load (word and active-spare word in
// the same clock; the fault map is cleared). Report faults with fault_valid /
// fault_ready / fault_clb, one at a time. repair_done pulses with the outcome
// (repair_result), the faulty CLB, the spare used and, for a repair, the
// number of connections that were moved to it (repair_moved). The nearest
// left and right spares of the CLB in repair_fault under the current map
// (the two BLRB candidates) are shown on lspare*/rspare*. Timing: see
// aru_controller (repair finished 3 clocks after the report is taken).
// clb_defect is the damage model of the array (see vrc_fabric).
module blrb_ft_fpga
  import aru_pkg::*;
#(
  parameter int unsigned P_N_CLB = N_CLB,
  parameter int unsigned P_N_PI  = N_PI,
  parameter int unsigned P_N_PO  = N_PO,
  parameter int unsigned P_N_IN  = N_IN,
  parameter int unsigned P_LUT_W = LUT_W,
  parameter int unsigned P_CF    = P_N_PI,
  localparam int unsigned IN_BITS  = $clog2(P_N_CLB + P_CF),
  localparam int unsigned IDX_BITS = $clog2(P_N_CLB),
  localparam int unsigned REC      = P_N_IN * IN_BITS + P_LUT_W,
  localparam int unsigned W        = P_N_CLB * REC + P_N_PO * IN_BITS,
  localparam int unsigned CNT_W    = $clog2(P_N_CLB + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration load
  input  logic                 cfg_load,
  input  logic [W-1:0]         cfg_load_word,
  input  logic [P_N_CLB-1:0]   cfg_load_active,
  // fault reports
  input  logic                 fault_valid,
  output logic                 fault_ready,
  input  logic [IDX_BITS-1:0]  fault_clb,
  // repair outcome
  output logic                 repair_done,
  output repair_result_e       repair_result,
  output logic [IDX_BITS-1:0]  repair_fault,
  output logic [IDX_BITS-1:0]  repair_spare,
  output logic [$clog2(P_N_CLB*P_N_IN+P_N_PO+1)-1:0] repair_moved,
  // BLRB candidates for the CLB in repair_fault, under the current map
  output logic                 lspare_found,
  output logic [IDX_BITS-1:0]  lspare,
  output logic                 rspare_found,
  output logic [IDX_BITS-1:0]  rspare,
  // the running circuit
  input  logic [P_N_PI-1:0]    pi,
  output logic [P_N_PO-1:0]    po,
  input  logic [P_N_CLB-1:0]   clb_defect,
  // state
  output logic [W-1:0]         cfg_word,
  output logic [P_N_CLB-1:0]   active_map,
  output logic [P_N_CLB-1:0]   fault_map,
  output logic [P_N_CLB-1:0]   spare_map,
  output logic [CNT_W-1:0]     n_spare
);

  logic [W-1:0]         new_word;
  logic                 cfg_we, st_retire, st_repair;
  logic [IDX_BITS-1:0]  fault_idx, spare_idx, best;
  logic                 found;
  logic [CNT_W-1:0]     n_fault;
  logic [$clog2(P_N_CLB*P_N_IN+P_N_PO+1)-1:0] fanout;

  // configuration register: loaded from outside or rewritten by the ARU
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfg_word <= '0;
    else if (cfg_load) cfg_word <= cfg_load_word;
    else if (cfg_we)   cfg_word <= new_word;
  end

  clb_state_table #(.P_N_CLB(P_N_CLB), .P_IDX_W(IDX_BITS)) u_map (
    .clk, .rst_n,
    .load(cfg_load), .load_active(cfg_load_active), .load_fault('0),
    .retire(st_retire), .repair(st_repair),
    .fault_idx, .spare_idx,
    .active(active_map), .fault(fault_map), .spare(spare_map),
    .n_spare, .n_fault
  );

  spare_selector #(.P_N_CLB(P_N_CLB), .P_IDX_W(IDX_BITS)) u_blrb (
    .spare(spare_map), .fault_idx,
    .l_found(lspare_found), .l_spare(lspare), .l_dist(), .r_found(rspare_found), .r_spare(rspare), .r_dist(),
    .found, .pick_right(), .best
  );

  reconfig_generator #(
    .P_N_CLB(P_N_CLB), .P_N_PO(P_N_PO), .P_N_IN(P_N_IN), .P_LUT_W(P_LUT_W),
    .P_IN_W(IN_BITS), .P_IDX_W(IDX_BITS), .P_CF(P_CF)
  ) u_reconf (
    .cfg_word, .fault_idx, .spare_idx, .new_word, .fanout
  );

  aru_controller #(.P_IDX_W(IDX_BITS)) u_ctrl (
    .clk, .rst_n,
    .fault_valid, .fault_ready, .fault_clb,
    .is_active(active_map[fault_idx]), .is_faulty(fault_map[fault_idx]),
    .spare_found(found), .spare_best(best),
    .fault_idx, .spare_idx, .cfg_we, .st_retire, .st_repair,
    .done(repair_done), .result(repair_result)
  );

  // number of connections moved by the last repair
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      repair_moved <= '0;
    else if (cfg_we) repair_moved <= fanout;
  end

  assign repair_fault = fault_idx;
  assign repair_spare = spare_idx;

  vrc_fabric #(
    .P_N_CLB(P_N_CLB), .P_N_PI(P_N_PI), .P_N_PO(P_N_PO), .P_N_IN(P_N_IN),
    .P_LUT_W(P_LUT_W), .P_IN_W(IN_BITS), .P_IDX_W(IDX_BITS), .P_CF(P_CF)
  ) u_array (
    .clk, .rst_n, .cfg_word, .pi, .clb_defect, .po, .clb_out()
  );

  // the configuration may only be reloaded while no repair is in progress
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_load |-> fault_ready);

endmodule
