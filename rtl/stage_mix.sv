// stage_mix: masks one adjacency-matrix row with the current cover vector.
//
// The branching engine never edits the adjacency matrix; instead every row it
// reads passes through this mask so that edges already covered disappear.
//   MIX_SELECT:   bit i = 1 when i is a neighbour of the row's vertex and i is
//                 not in the cover; all zeros when the row's own vertex is in
//                 the cover. Its popcount is the vertex's current degree, and
//                 the vector itself is the set of neighbours still to cover.
//   MIX_EDGELESS: bit i = 0 only for such an uncovered edge; all ones when the
//                 row's own vertex is in the cover. The row is free of
//                 uncovered edges exactly when the result is all ones.
//   otherwise:    all zeros.
// Purely combinational. The two modes and their encodings follow the
// original engine's mask generator.
//
// Ports: mode, row_in_cover (cover bit of the row's own vertex), adj_row,
// cover_vec, vec (result).
module stage_mix
  import vc_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  mix_mode_e      mode,
  input  logic           row_in_cover,
  input  logic [N-1:0]   adj_row,
  input  logic [N-1:0]   cover_vec,
  output logic [N-1:0]   vec
);

  logic [N-1:0] uncovered;
  assign uncovered = adj_row & ~cover_vec;

  always_comb begin
    unique case (mode)
      MIX_SELECT:   vec = row_in_cover ? '0 : uncovered;
      MIX_EDGELESS: vec = row_in_cover ? '1 : ~uncovered;
      default:      vec = '0;
    endcase
  end

endmodule
