// aru_controller: sequencer of the autonomous restructuring unit.
//
// Takes one fault report at a time (valid/ready handshake on fault_valid,
// fault_ready, fault_clb) and walks it through the restructuring flow:
//   IDLE    : wait for a report, latch the faulty CLB number.
//   ANALYZE : the separated configuration and the spare search are ready.
//             - CLB already known faulty      -> RES_KNOWN, nothing changes
//             - CLB not active (unused spare)  -> RES_RETIRED, mark it faulty;
//               the circuit keeps working, no reconfiguration is needed
//             - active CLB, spare found        -> latch the spare, go RECONF
//             - active CLB, no spare left      -> RES_NO_SPARE, mark it faulty
//   RECONF  : write the reconfigured word (cfg_we) and update the
//             active/spare map (st_repair) in the same clock.
//   DONE    : done is high for one clock with result and the indices.
// A report accepted at clock edge t is finished (done high) in the cycle that
// starts at edge t+2 for RES_KNOWN/RES_RETIRED/RES_NO_SPARE and at t+3 for a
// repair; the new configuration word is in place from edge t+3 on.
//
// Checking first whether the fault affects the circuit at all, then choosing
// a spare and reconfiguring, follows the described flow; the states, the
// handshake and the timing are this design's choices.
module aru_controller
  import aru_pkg::*;
#(
  parameter int unsigned P_IDX_W = IDX_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // fault report
  input  logic                fault_valid,
  output logic                fault_ready,
  input  logic [P_IDX_W-1:0]  fault_clb,
  // status of the latched CLB and the spare search
  input  logic                is_active,
  input  logic                is_faulty,
  input  logic                spare_found,
  input  logic [P_IDX_W-1:0]  spare_best,
  // actions
  output logic [P_IDX_W-1:0]  fault_idx,
  output logic [P_IDX_W-1:0]  spare_idx,
  output logic                cfg_we,
  output logic                st_retire,
  output logic                st_repair,
  // completion
  output logic                done,
  output repair_result_e      result
);

  typedef enum logic [1:0] {S_IDLE, S_ANALYZE, S_RECONF, S_DONE} state_e;

  state_e state_q, state_d;
  repair_result_e result_d;
  logic [P_IDX_W-1:0] spare_d;

  always_comb begin
    state_d   = state_q;
    result_d  = result;
    spare_d   = spare_idx;
    st_retire = 1'b0;
    st_repair = 1'b0;
    cfg_we    = 1'b0;
    unique case (state_q)
      S_IDLE:
        if (fault_valid) state_d = S_ANALYZE;
      S_ANALYZE: begin
        state_d = S_DONE;
        if (is_faulty) begin
          result_d = RES_KNOWN;
        end else if (!is_active) begin
          result_d  = RES_RETIRED;
          st_retire = 1'b1;
        end else if (spare_found) begin
          spare_d = spare_best;
          state_d = S_RECONF;
        end else begin
          result_d  = RES_NO_SPARE;
          st_retire = 1'b1;
        end
      end
      S_RECONF: begin
        cfg_we    = 1'b1;
        st_repair = 1'b1;
        result_d  = RES_REPAIRED;
        state_d   = S_DONE;
      end
      S_DONE:
        state_d = S_IDLE;
      default:
        state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      fault_idx <= '0;
      spare_idx <= '0;
      result    <= RES_KNOWN;
    end else begin
      state_q   <= state_d;
      spare_idx <= spare_d;
      result    <= result_d;
      if (state_q == S_IDLE && fault_valid) fault_idx <= fault_clb;
    end
  end

  assign fault_ready = (state_q == S_IDLE);
  assign done        = (state_q == S_DONE);

  // a map update and a configuration write only ever come from their states
  a_we_in_reconf: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we |-> (state_q == S_RECONF));
  a_one_update: assert property (@(posedge clk) disable iff (!rst_n)
    !(st_retire && st_repair));
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);

endmodule
