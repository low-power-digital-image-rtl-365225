// cell_network: the region-growing array, third pipeline stage.
//
// ROWS x COLS cells P_ij (seg_cell) with a horizontal weight register WRh_ij
// beside every cell and a vertical weight register WRv_ij below every
// cell but the last row (weight_reg). Each cell reads the excitation flags of
// its four neighbours and the four weights towards them. Around the array sit
// the hierarchical global inhibitor (ZOR_i and ZOR), the row clock controller
// (p_CLK_i) and the leader selector.
//
// Loading (CMD_SHIFT): every cycle one column bundle enters at network
// column 0 (weights to the previous image column in_wh, vertical weights
// in_wv, leader flags in_leader) and the weight registers and leader flags of
// each row shift one column right; after COLS shifts the block is in place.
// The network is therefore a first-in first-out store: network column j holds
// image column COLS-1-j, and the weight register WRh of cell (r,j) is the one
// between network columns j and j+1 (0 in the last column, the image border).
// Read-out (CMD_OUTPUT): the segment numbers shift one column right per cycle
// and the rightmost network column appears on ox (OX_i), so the block's image
// columns come out in input order, image column 0 first. Segmentation:
// CMD_SELF excites the leader chosen by the selector, CMD_GROW grows the
// region by one step on all boundary cells in parallel, and zor = 0 says that
// no cell is excitable any more; CMD_LABEL then gives the region its segment
// number seg_num.
// The control of these commands is in seg_controller. The per-cell clock
// enables (ce), excitation flags, activity flags and labels are brought out for
// observation.
//
// From the design: the cell/weight-register layout, parallel region growing,
// BAO stand-by with row-wise clock gating from the global inhibitor, and the
// row outputs OX_i. This implementation's choice: shift-register loading and
// read-out and the
// leader selector in image raster order.
module cell_network
  import seg_pkg::*;
#(
  parameter int unsigned ROWS  = seg_pkg::DEF_ROWS,
  parameter int unsigned COLS  = seg_pkg::DEF_COLS,
  parameter int unsigned W_W   = seg_pkg::DEF_W_W,
  parameter int unsigned LW    = $clog2(ROWS * COLS + 1),
  parameter int unsigned PHI_Z = seg_pkg::DEF_PHI_Z,
  parameter int unsigned GROUP = seg_pkg::DEF_GROUP
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cell_cmd_t       cmd,
  input  logic [LW-1:0]   seg_num,
  input  logic [W_W-1:0]  in_wh     [ROWS],     // weight to the previous column
  input  logic [W_W-1:0]  in_wv     [ROWS-1],
  input  logic            in_leader [ROWS],
  output logic [LW-1:0]   ox        [ROWS],       // OX_i: label of column COLS-1
  output logic            zor,                    // some cell is excitable
  output logic            any_cand,               // some free leader is left
  output logic            row_en    [ROWS],       // p_CLK_i
  output logic [COLS-1:0] excited   [ROWS],
  output logic [COLS-1:0] active    [ROWS],
  output logic [COLS-1:0] ce        [ROWS],
  output logic [LW-1:0]   labels    [ROWS][COLS]
);

  localparam int unsigned NGRP = (ROWS + GROUP - 1) / GROUP;

  logic [W_W-1:0]  wh     [ROWS][COLS];     // WRh: weight between (r,c) and (r,c+1)
  logic [W_W-1:0]  wv     [ROWS-1][COLS];   // WRv: weight between (r,c) and (r+1,c)
  logic [COLS-1:0] leader [ROWS];
  logic [COLS-1:0] cand   [ROWS];
  logic [COLS-1:0] sel    [ROWS];
  logic [COLS-1:0] z      [ROWS];
  logic            zor_row [ROWS];
  logic            zor_grp [NGRP];
  logic            row_sel [ROWS];
  logic            row_exc [ROWS];
  logic            clk_enable;

  // ---- weight registers -------------------------------------------------
  for (genvar r = 0; r < ROWS; r++) begin : g_wrh_row
    for (genvar c = 0; c < COLS; c++) begin : g_wrh
      weight_reg #(.W_W(W_W)) u_wrh (
        .clk, .rst_n,
        .shift (cmd == CMD_SHIFT && row_en[r]),
        .d     (c == 0 ? in_wh[r] : wh[r][c == 0 ? 0 : c-1]),
        .q     (wh[r][c])
      );
    end
  end

  for (genvar r = 0; r < ROWS - 1; r++) begin : g_wrv_row
    for (genvar c = 0; c < COLS; c++) begin : g_wrv
      weight_reg #(.W_W(W_W)) u_wrv (
        .clk, .rst_n,
        .shift (cmd == CMD_SHIFT && row_en[r]),
        .d     (c == 0 ? in_wv[r] : wv[r][c == 0 ? 0 : c-1]),
        .q     (wv[r][c])
      );
    end
  end

  // ---- cells --------------------------------------------------------------
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_cell
      logic [3:0]     nb_exc;
      logic [W_W-1:0] nb_w [4];

      // up, down, left, right; missing neighbours read as not excited
      if (r > 0) begin : g_up
        assign nb_exc[0] = excited[r-1][c];
        assign nb_w[0]   = wv[r-1][c];
      end else begin : g_no_up
        assign nb_exc[0] = 1'b0;
        assign nb_w[0]   = '0;
      end
      if (r < ROWS - 1) begin : g_dn
        assign nb_exc[1] = excited[r+1][c];
        assign nb_w[1]   = wv[r][c];
      end else begin : g_no_dn
        assign nb_exc[1] = 1'b0;
        assign nb_w[1]   = '0;
      end
      if (c > 0) begin : g_lf
        assign nb_exc[2] = excited[r][c-1];
        assign nb_w[2]   = wh[r][c-1];
      end else begin : g_no_lf
        assign nb_exc[2] = 1'b0;
        assign nb_w[2]   = '0;
      end
      if (c < COLS - 1) begin : g_rt
        assign nb_exc[3] = excited[r][c+1];
        assign nb_w[3]   = wh[r][c];
      end else begin : g_no_rt
        assign nb_exc[3] = 1'b0;
        assign nb_w[3]   = '0;
      end

      seg_cell #(.W_W(W_W), .LW(LW), .PHI_Z(PHI_Z)) u_cell (
        .clk, .rst_n,
        .cmd,
        .row_en    (row_en[r]),
        .sel       (sel[r][c]),
        .seg_num,
        .leader_in (c == 0 ? in_leader[r] : leader[r][c == 0 ? 0 : c-1]),
        .label_in  (c == 0 ? LW'(0) : labels[r][c == 0 ? 0 : c-1]),
        .nb_exc,
        .nb_w,
        .excited   (excited[r][c]),
        .leader    (leader[r][c]),
        .cand      (cand[r][c]),
        .label     (labels[r][c]),
        .active    (active[r][c]),
        .z         (z[r][c]),
        .ce        (ce[r][c])
      );
    end
  end

  // ---- periphery ----------------------------------------------------------
  global_inhibitor #(.ROWS(ROWS), .COLS(COLS), .GROUP(GROUP)) u_gi (
    .z, .zor_row, .zor_grp, .zor
  );

  leader_select #(.ROWS(ROWS), .COLS(COLS)) u_lsel (
    .cand, .sel, .row_sel, .any(any_cand)
  );

  always_comb
    for (int r = 0; r < ROWS; r++) row_exc[r] = |excited[r];

  clock_controller #(.ROWS(ROWS)) u_clk (
    .cmd, .zor_row, .zor, .row_exc, .row_sel, .row_en, .clk_enable
  );

  always_comb
    for (int r = 0; r < ROWS; r++) ox[r] = labels[r][COLS-1];

endmodule
