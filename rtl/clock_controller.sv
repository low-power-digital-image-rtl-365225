// clock_controller: row clock gating of the cell network.
//
// Produces one clock enable per cell-network row (p_CLK_i). A row is clocked
// only when the command of this cycle has work for it:
//   CMD_CLEAR, CMD_SHIFT, CMD_OUTPUT : every row (block load and read-out)
//   CMD_SELF  : only the row holding the selected leader cell (row_sel)
//   CMD_GROW  : only rows with boundary cells about to be excited (ZOR_i = 1)
//   CMD_LABEL : only rows holding excited cells (row_exc)
//   CMD_HOLD  : no row
// clk_enable is the global enable of growing (the global ZOR). Combinational;
// the enables act on the next rising clock edge. In silicon each enable drives
// a clock gate for its row; here the cells and weight registers use it as a
// clock enable.
//
// From the design: per-row gated clocks, decided from the per-row outputs of
// the global inhibitor, so that only region-growing boundary rows get the
// clock. This implementation's choice: the gating of rows in the non-growing
// commands (self-excitation, labeling).
module clock_controller
  import seg_pkg::*;
#(
  parameter int unsigned ROWS = seg_pkg::DEF_ROWS
) (
  input  cell_cmd_t cmd,
  input  logic      zor_row [ROWS],   // ZOR_i from the global inhibitor
  input  logic      zor,              // global ZOR
  input  logic      row_exc [ROWS],   // row holds excited cells
  input  logic      row_sel [ROWS],   // row holds the selected leader
  output logic      row_en  [ROWS],   // p_CLK_i enables
  output logic      clk_enable
);

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      unique case (cmd)
        CMD_CLEAR, CMD_SHIFT, CMD_OUTPUT: row_en[r] = 1'b1;
        CMD_SELF:  row_en[r] = row_sel[r];
        CMD_GROW:  row_en[r] = zor_row[r];
        CMD_LABEL: row_en[r] = row_exc[r];
        default:   row_en[r] = 1'b0;
      endcase
    end
  end

  assign clk_enable = zor;

endmodule
