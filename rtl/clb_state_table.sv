// clb_state_table: active / spare / faulty map of the array.
//
// Holds the active-spare word (bit k = 1: CLB k carries part of the circuit,
// 0: CLB k is free) and the fault word (bit k = 1: CLB k is known faulty).
// A CLB is an available spare when it is neither active nor faulty.
//
// Operations, one per clock, load having priority:
//   load    : active <= load_active, fault <= load_fault (new configuration)
//   retire  : fault[f] <= 1, active[f] <= 0 (fault on an unused CLB, or an
//             active CLB that could not be moved)
//   repair  : fault[f] <= 1, active[f] <= 0, active[s] <= 1 (CLB f moved to s)
// Reset clears both words. The active-spare word arriving with the
// configuration and its update after a repair ("one fault more, one spare
// less") follow the described method; the separate fault word is this
// design's way to keep a faulty CLB out of the spare pool.
module clb_state_table
  import aru_pkg::*;
#(
  parameter int unsigned P_N_CLB = N_CLB,
  parameter int unsigned P_IDX_W = IDX_W,
  localparam int unsigned CNT_W  = $clog2(P_N_CLB + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [P_N_CLB-1:0]  load_active,
  input  logic [P_N_CLB-1:0]  load_fault,
  input  logic                retire,
  input  logic                repair,
  input  logic [P_IDX_W-1:0]  fault_idx,
  input  logic [P_IDX_W-1:0]  spare_idx,
  output logic [P_N_CLB-1:0]  active,
  output logic [P_N_CLB-1:0]  fault,
  output logic [P_N_CLB-1:0]  spare,
  output logic [CNT_W-1:0]    n_spare,
  output logic [CNT_W-1:0]    n_fault
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
      fault  <= '0;
    end else if (load) begin
      active <= load_active;
      fault  <= load_fault;
    end else if (repair) begin
      fault[fault_idx]  <= 1'b1;
      active[fault_idx] <= 1'b0;
      active[spare_idx] <= 1'b1;
    end else if (retire) begin
      fault[fault_idx]  <= 1'b1;
      active[fault_idx] <= 1'b0;
    end
  end

  always_comb begin
    spare   = ~active & ~fault;
    n_spare = '0;
    n_fault = '0;
    for (int k = 0; k < P_N_CLB; k++) begin
      n_spare = n_spare + CNT_W'(spare[k]);
      n_fault = n_fault + CNT_W'(fault[k]);
    end
  end

endmodule
