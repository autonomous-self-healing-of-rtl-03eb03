// nearest_spare: spare selection for one faulty CLB.
//
// Starting from the faulty CLB, the block looks for the first free spare on
// its left (lower CLB numbers) and the first on its right (higher CLB
// numbers) and returns the one that is closer, so that the connections moved
// onto the spare stay as short as possible. When both lie at the same
// distance the right-hand spare is taken.
//
// Interface: `fault_idx` is the CLB to replace, `spare` marks the CLBs that
// are free and not faulty. `found` is low when no spare exists; otherwise
// `spare_idx` is the chosen spare and `distance` its distance from the faulty
// CLB. `left_found`/`left_idx` and `right_found`/`right_idx` give the
// candidates of both sides.
//
// Timing: purely combinational.
//
// The left/right search and the nearest choice follow the design
// description; the distance measure along the row of CLBs and the tie rule
// are this design's own choices.
module nearest_spare
  import nsclb_pkg::*;
(
  input  clb_idx_t         fault_idx,
  input  logic [N_CLB-1:0] spare,
  output logic             found,
  output clb_idx_t         spare_idx,
  output clb_idx_t         distance,
  output logic             left_found,
  output clb_idx_t         left_idx,
  output logic             right_found,
  output clb_idx_t         right_idx
);

  int unsigned f;
  int unsigned dl;
  int unsigned dr;

  always_comb begin
    f = int'(fault_idx);
    left_found  = 1'b0;
    left_idx    = '0;
    right_found = 1'b0;
    right_idx   = '0;
    // Nearest spare below the fault: the last one met counting upwards.
    for (int unsigned i = 0; i < N_CLB; i++)
      if (i < f && spare[i]) begin
        left_found = 1'b1;
        left_idx   = clb_idx_t'(i);
      end
    // Nearest spare above the fault: the last one met counting downwards.
    for (int i = N_CLB - 1; i >= 0; i--)
      if (unsigned'(i) > f && spare[i]) begin
        right_found = 1'b1;
        right_idx   = clb_idx_t'(i);
      end
    dl = f - int'(left_idx);
    dr = int'(right_idx) - f;
    found     = left_found || right_found;
    spare_idx = '0;
    distance      = '0;
    if (right_found && (!left_found || dr <= dl)) begin
      spare_idx = right_idx;
      distance      = clb_idx_t'(dr);
    end else if (left_found) begin
      spare_idx = left_idx;
      distance      = clb_idx_t'(dl);
    end
  end

endmodule
