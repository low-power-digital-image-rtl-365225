// seg_cell: one cell P_ij of the cell network, the pixel-level processing
// element of region growing.
//
// A cell is FREE, EXCITED (member of the region now growing) or INHIBITED
// (labeled with a segment number). Commands are broadcast by the controller:
//   CMD_CLEAR  : FREE, label 0, leader flag 0 (start of a block)
//   CMD_SHIFT  : take the leader flag of the left neighbour (block loading)
//   CMD_SELF   : the one selected leader cell (sel) excites itself
//   CMD_GROW   : a FREE cell whose weights towards EXCITED neighbours add up
//                to more than PHI_Z becomes EXCITED
//   CMD_LABEL  : EXCITED cells take seg_num and become INHIBITED
//   CMD_OUTPUT : take the label of the left neighbour (result read-out)
// Boundary-active-only (BAO): a cell is active only when it is FREE and has at
// least one EXCITED neighbour. Otherwise (no excited neighbour, already
// excited, already labeled) it is in stand-by: its clock enable ce stays low
// during growing and its state signal z to the global inhibitor is cut. z is
// high when the cell is active and its excitation condition holds, i.e. when
// it will become excited on the next growing step. The cell is clocked only
// when its row clock (row_en) is on as well. Updates happen on
// the rising clock edge when ce is high; ce is exported so the clocked
// activity can be observed. Neighbour order in nb_exc / nb_w: up, down,
// left, right; a missing neighbour is tied to 0.
//
// From the design: the three states, self-excitation of leader cells,
// excitation from neighbour states and weights, inhibition with a segment
// number, the three stand-by conditions, the gated clock and the state
// signal cut in stand-by. This implementation's choice: the weighted-sum
// excitation rule with threshold PHI_Z, the command set, shift-register
// loading and read-out, and modelling the gated clock as a clock enable.
module seg_cell
  import seg_pkg::*;
#(
  parameter int unsigned W_W   = seg_pkg::DEF_W_W,
  parameter int unsigned LW    = 11,
  parameter int unsigned PHI_Z = seg_pkg::DEF_PHI_Z
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cell_cmd_t      cmd,
  input  logic           row_en,       // row clock enable (p_CLK) from the clock controller
  input  logic           sel,          // chosen for self-excitation
  input  logic [LW-1:0]  seg_num,      // segment number for CMD_LABEL
  input  logic           leader_in,    // leader flag from the left (loading)
  input  logic [LW-1:0]  label_in,     // label from the left (read-out)
  input  logic [3:0]     nb_exc,       // neighbours excited: up, down, left, right
  input  logic [W_W-1:0] nb_w [4],     // weights to those neighbours
  output logic           excited,
  output logic           leader,
  output logic           cand,         // FREE leader: may self-excite
  output logic [LW-1:0]  label,
  output logic           active,       // not in stand-by
  output logic           z,            // state signal to the global inhibitor
  output logic           ce            // clock enable of this cell
);

  localparam int unsigned SUM_W = W_W + 2;

  cell_state_t      state;
  logic [SUM_W-1:0] wsum;

  always_comb begin
    wsum = '0;
    for (int k = 0; k < 4; k++)
      if (nb_exc[k]) wsum = wsum + SUM_W'(nb_w[k]);
  end

  assign excited = (state == CELL_EXCITED);
  assign cand    = leader && (state == CELL_FREE);
  assign active  = (state == CELL_FREE) && (|nb_exc);
  assign z       = active && (32'(wsum) > PHI_Z);

  always_comb begin
    unique case (cmd)
      CMD_CLEAR, CMD_SHIFT, CMD_OUTPUT: ce = row_en;
      CMD_SELF:  ce = row_en && sel;
      CMD_GROW:  ce = row_en && active;
      CMD_LABEL: ce = row_en && excited;
      default:   ce = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= CELL_FREE;
      leader <= 1'b0;
      label  <= '0;
    end else if (ce) begin
      unique case (cmd)
        CMD_CLEAR: begin
          state  <= CELL_FREE;
          leader <= 1'b0;
          label  <= '0;
        end
        CMD_SHIFT:  leader <= leader_in;
        CMD_SELF:   if (state == CELL_FREE) state <= CELL_EXCITED;
        CMD_GROW:   if (z) state <= CELL_EXCITED;
        CMD_LABEL: begin
          state <= CELL_INHIBITED;
          label <= seg_num;
        end
        CMD_OUTPUT: label <= label_in;
        default: ;
      endcase
    end
  end

endmodule
