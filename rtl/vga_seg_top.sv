// vga_seg_top: real-time segmentation of a VGA-size frame with one
// boundary-active-only cell network.
//
// The frame (IMG_W x IMG_H, NCH channels) is segmented block by block: the
// block sequencer cuts it into NBX x NBY overlapping blocks of COLS x ROWS
// pixels and feeds their pixel columns to the segmentation core, which finds
// the segments of each block by region growing in its cell network and reads
// the segment numbers out column by column. A pulse on start segments one
// frame; frame_done pulses when the last block has been read out.
//
// Frame source interface: the design presents rd_x / rd_y0 and expects the
// pixels of rows rd_y0 .. rd_y0+ROWS-1 of column rd_x on rd_col in the same
// cycle (rows past the frame bottom are ignored).
// Result interface: out_valid marks one block column; out_bx / out_by name
// the block, out_col the column inside it (0 first, up to COLS-1), out_x
// its frame column, out_y0 the frame row of out_labels[0]; out_labels hold
// the segment numbers, numbered per block from 1, 0 where no segment grew.
// Segment numbers are local to a block: joining segments across blocks
// through the one-pixel overlap is left to a following processing step.
//
// Per block: COLS cycles input, one flush cycle, the segmentation, COLS
// cycles output, then the next block is fetched.
//
// From the design: sizes (41 x 33 cells, 16 x 15 blocks, 640 x 480 frame),
// the sequential block processing and the core structure. This
// implementation's choice: the interfaces and the thresholds (parameters).
module vga_seg_top
  import seg_pkg::*;
#(
  parameter int unsigned IMG_W = seg_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = seg_pkg::DEF_IMG_H,
  parameter int unsigned COLS  = seg_pkg::DEF_COLS,
  parameter int unsigned ROWS  = seg_pkg::DEF_ROWS,
  parameter int unsigned NBX   = seg_pkg::DEF_NBX,
  parameter int unsigned NBY   = seg_pkg::DEF_NBY,
  parameter int unsigned NCH   = seg_pkg::DEF_NCH,
  parameter int unsigned PIX_W = seg_pkg::DEF_PIX_W,
  parameter int unsigned W_W   = seg_pkg::DEF_W_W,
  parameter int unsigned SLOPE = seg_pkg::DEF_SLOPE,
  parameter int unsigned PHI_P = seg_pkg::DEF_PHI_P,
  parameter int unsigned PHI_Z = seg_pkg::DEF_PHI_Z,
  parameter int unsigned GROUP = seg_pkg::DEF_GROUP,
  localparam int unsigned XW   = $clog2(IMG_W + COLS),
  localparam int unsigned YW   = $clog2(IMG_H + ROWS),
  localparam int unsigned BXW  = $clog2(NBX + 1),
  localparam int unsigned BYW  = $clog2(NBY + 1),
  localparam int unsigned CW   = $clog2(COLS + 1),
  localparam int unsigned LW   = $clog2(ROWS * COLS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             frame_done,
  // frame source
  output logic [XW-1:0]    rd_x,
  output logic [YW-1:0]    rd_y0,
  input  logic [PIX_W-1:0] rd_col [ROWS][NCH],
  // segmentation result
  output logic             out_valid,
  output logic [BXW-1:0]   out_bx,
  output logic [BYW-1:0]   out_by,
  output logic [CW-1:0]    out_col,
  output logic [XW-1:0]    out_x,
  output logic [YW-1:0]    out_y0,
  output logic             out_last,
  output logic [LW-1:0]    out_labels [ROWS],
  output logic [LW-1:0]    seg_count
);

  logic             col_valid, col_ready, blk_done, seq_busy, core_busy;
  logic [PIX_W-1:0] col_data [ROWS][NCH];
  logic [XW-1:0]    x0;

  block_sequencer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .COLS(COLS), .ROWS(ROWS),
                    .NBX(NBX), .NBY(NBY), .NCH(NCH), .PIX_W(PIX_W)) u_seq (
    .clk, .rst_n, .start,
    .rd_x, .rd_y0, .rd_col,
    .col_valid, .col_ready, .col_data, .blk_done,
    .bx(out_bx), .by(out_by), .x0, .y0(out_y0),
    .busy(seq_busy), .frame_done
  );

  seg_core #(.ROWS(ROWS), .COLS(COLS), .NCH(NCH), .PIX_W(PIX_W), .W_W(W_W),
             .SLOPE(SLOPE), .PHI_P(PHI_P), .PHI_Z(PHI_Z), .GROUP(GROUP)) u_core (
    .clk, .rst_n,
    .in_valid(col_valid), .in_ready(col_ready), .in_col(col_data),
    .out_valid, .out_col, .out_last, .out_labels,
    .busy(core_busy), .blk_done, .seg_count
  );

  assign out_x = x0 + XW'(out_col);
  assign busy  = seq_busy || core_busy;

endmodule
