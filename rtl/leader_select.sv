// leader_select: picks one leader cell for self-excitation.
//
// Among the cells that are leaders and still free (cand), the first in image
// raster order is chosen: the lowest row that has a candidate, and in that row
// the highest network column, which holds the leftmost image column (the
// network stores a block mirrored, see cell_network). sel is one-hot (or all zero when any = 0); row_sel marks the
// chosen row. Two priority chains keep the logic row-wise: one over the row
// ORs and one over the columns of each row. Purely combinational.
//
// The design starts each region from a leader cell but leaves the choice open;
// raster order is this implementation's choice.
module leader_select #(
  parameter int unsigned ROWS = seg_pkg::DEF_ROWS,
  parameter int unsigned COLS = seg_pkg::DEF_COLS
) (
  input  logic [COLS-1:0] cand    [ROWS],
  output logic [COLS-1:0] sel     [ROWS],
  output logic            row_sel [ROWS],
  output logic            any
);

  always_comb begin
    logic row_taken, col_taken;
    row_taken = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      row_sel[r] = !row_taken && (|cand[r]);
      row_taken  = row_taken || (|cand[r]);
      col_taken  = 1'b0;
      for (int c = COLS - 1; c >= 0; c--) begin
        sel[r][c] = row_sel[r] && cand[r][c] && !col_taken;
        col_taken = col_taken || cand[r][c];
      end
    end
    any = row_taken;
  end

endmodule
