// global_inhibitor: hierarchical OR of the state signals of all cells.
//
// Each cell raises its state signal z when it is active (a boundary cell) and
// will be excited on the next growing step. The global inhibitor tells the
// controller whether region growing still goes on: when no cell is excitable
// (zor = 0) the current region is complete and its cells are labeled and
// inhibited. The OR is built in three levels, as in a row-wise circuit: one
// ZOR_i per row, one OR per group of GROUP rows, and the global ZOR over the
// groups. The per-row results also tell the clock controller which rows hold
// boundary cells. Purely combinational.
//
// From the design: an OR of the state signals of all active cells, computed
// per row (ZOR_i) and combined hierarchically over groups of four rows into a
// global ZOR; stand-by cells contribute nothing. This implementation's
// choice: static logic in place of the dynamic (precharged) circuit, and the
// group output port.
module global_inhibitor #(
  parameter int unsigned ROWS  = seg_pkg::DEF_ROWS,
  parameter int unsigned COLS  = seg_pkg::DEF_COLS,
  parameter int unsigned GROUP = seg_pkg::DEF_GROUP,
  localparam int unsigned NGRP = (ROWS + GROUP - 1) / GROUP
) (
  input  logic [COLS-1:0] z       [ROWS],   // state signals, one row per entry
  output logic            zor_row [ROWS],   // ZOR_i
  output logic            zor_grp [NGRP],   // OR over GROUP rows
  output logic            zor               // global ZOR
);

  always_comb begin
    for (int r = 0; r < ROWS; r++) zor_row[r] = |z[r];
    for (int g = 0; g < NGRP; g++) begin
      zor_grp[g] = 1'b0;
      for (int r = g * GROUP; r < (g + 1) * GROUP && r < ROWS; r++)
        zor_grp[g] = zor_grp[g] | zor_row[r];
    end
    zor = 1'b0;
    for (int g = 0; g < NGRP; g++) zor = zor | zor_grp[g];
  end

endmodule
