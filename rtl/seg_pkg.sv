// seg_pkg: shared constants, types and helper functions of the cell-network
// image segmenter.
//
// The segmenter grows regions from seed pixels ("leader cells") over a grid of
// cells that are joined by connection weights. This package holds what the
// modules share: the default array size (41 x 33 cells, 16 x 15 blocks of a
// 640 x 480 frame), the pixel and weight widths, the cell state encoding and
// the weight function.
//
// Following the design: the array and frame sizes, the three cell states
// (free / excited / inhibited, where a free cell becomes excited either by
// self-excitation as a leader or by its neighbours).
// This implementation's own choices: 8-bit colour channels, 8-bit weights,
// the weight formula W = max(0, WMAX - SLOPE * max_channel |difference|),
// the default thresholds PHI_P and PHI_Z.
package seg_pkg;

  // Cell-network size of the block processor (columns x rows).
  localparam int unsigned DEF_COLS  = 41;
  localparam int unsigned DEF_ROWS  = 33;
  // Frame size and block grid.
  localparam int unsigned DEF_IMG_W = 640;
  localparam int unsigned DEF_IMG_H = 480;
  localparam int unsigned DEF_NBX   = 16;
  localparam int unsigned DEF_NBY   = 15;
  // Pixel format: NCH channels of PIX_W bits (RGB).
  localparam int unsigned DEF_PIX_W = 8;
  localparam int unsigned DEF_NCH   = 3;
  // Connection weight width.
  localparam int unsigned DEF_W_W   = 8;
  // Slope of the weight function: W = max(0, 2^W_W - 1 - SLOPE * difference).
  localparam int unsigned DEF_SLOPE = 8;
  // Leader threshold: sum of the (up to) four weights of a cell must exceed it.
  localparam int unsigned DEF_PHI_P = 800;
  // Excitation threshold: sum of the weights towards excited neighbours must
  // exceed it.
  localparam int unsigned DEF_PHI_Z = 120;
  // Rows per group of the hierarchical global inhibitor.
  localparam int unsigned DEF_GROUP = 4;

  // State of a cell P_ij.
  typedef enum logic [1:0] {
    CELL_FREE      = 2'd0,  // not yet part of a segment
    CELL_EXCITED   = 2'd1,  // member of the region being grown
    CELL_INHIBITED = 2'd2   // labeled with a segment number, out of the game
  } cell_state_t;

  // Command the controller broadcasts to every cell.
  typedef enum logic [2:0] {
    CMD_HOLD   = 3'd0,  // nothing (cells keep their state)
    CMD_CLEAR  = 3'd1,  // start of a block: all cells free, label 0
    CMD_SHIFT  = 3'd2,  // load: shift weights and leader flags one column right
    CMD_SELF   = 3'd3,  // self-excitation of the selected leader cell
    CMD_GROW   = 3'd4,  // one region-growing step
    CMD_LABEL  = 3'd5,  // excited cells take the segment number, get inhibited
    CMD_OUTPUT = 3'd6   // shift segment numbers one column right to OX_i
  } cell_cmd_t;

endpackage
