// spare_selector: BLRB (best left / right block) spare search.
//
// From the faulty CLB's position, looks for the first available spare to its
// left (lower CLB numbers, LSpare) and the first to its right (higher CLB
// numbers, RSpare), and picks the nearer of the two as the replacement.
// CLBs are numbered row by row in the 8x8 array, so the search runs along the
// faulty CLB's row first and continues into the neighbouring rows; it does
// not wrap around the ends of the array. On equal distance the left spare is
// taken.
//
// Purely combinational; found = 0 when no spare exists on either side. The
// left/right nearest-spare rule follows the described method; the row-major
// search order and the tie rule are this design's choices.
module spare_selector
  import aru_pkg::*;
#(
  parameter int unsigned P_N_CLB = N_CLB,
  parameter int unsigned P_IDX_W = IDX_W
) (
  input  logic [P_N_CLB-1:0]  spare,       // available spares
  input  logic [P_IDX_W-1:0]  fault_idx,
  output logic                l_found,
  output logic [P_IDX_W-1:0]  l_spare,     // LSpare
  output logic [P_IDX_W-1:0]  l_dist,
  output logic                r_found,
  output logic [P_IDX_W-1:0]  r_spare,     // RSpare
  output logic [P_IDX_W-1:0]  r_dist,
  output logic                found,
  output logic                pick_right,
  output logic [P_IDX_W-1:0]  best
);

  always_comb begin
    l_found = 1'b0;
    l_spare = '0;
    r_found = 1'b0;
    r_spare = '0;
    // left: highest-numbered spare below the fault
    for (int k = 0; k < P_N_CLB; k++) begin
      if (P_IDX_W'(k) < fault_idx && spare[k]) begin
        l_found = 1'b1;
        l_spare = P_IDX_W'(k);
      end
    end
    // right: lowest-numbered spare above the fault
    for (int k = P_N_CLB - 1; k >= 0; k--) begin
      if (P_IDX_W'(k) > fault_idx && spare[k]) begin
        r_found = 1'b1;
        r_spare = P_IDX_W'(k);
      end
    end
    l_dist     = fault_idx - l_spare;
    r_dist     = r_spare - fault_idx;
    found      = l_found || r_found;
    pick_right = r_found && (!l_found || (r_dist < l_dist));
    best       = pick_right ? r_spare : l_spare;
  end

endmodule
