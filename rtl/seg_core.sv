// seg_core: segmentation of one block of ROWS x COLS pixels.
//
// The four pipeline stages of the segmenter: weight calculation
// (weight_calc), leader determination (leader_calc), the cell network with its
// global inhibitor and row clock control (cell_network) and the result output
// (seg_output), sequenced by seg_controller.
//
// Interface: pixel columns (ROWS pixels of NCH channels, column 0 first) are
// taken with in_valid/in_ready, one per cycle at full rate, COLS of them per
// block. Then follow one flush cycle, the segmentation (self-excitation,
// growing, labeling per region) and the read-out: COLS cycles with out_valid
// high, columns 0 to COLS-1, each with ROWS segment numbers (0 = no
// segment). blk_done pulses one cycle after the last column; seg_count gives
// the number of segments of that block. The next block may be offered as soon
// as in_ready rises again.
//
// From the design: the stage split, the cell network and its BAO clock
// gating, and COLS cycles each for data input and result output. This
// implementation's choice: the valid/ready input, the widths and thresholds
// (parameters), and loading and reading out through shift chains.
module seg_core
  import seg_pkg::*;
#(
  parameter int unsigned ROWS  = seg_pkg::DEF_ROWS,
  parameter int unsigned COLS  = seg_pkg::DEF_COLS,
  parameter int unsigned NCH   = seg_pkg::DEF_NCH,
  parameter int unsigned PIX_W = seg_pkg::DEF_PIX_W,
  parameter int unsigned W_W   = seg_pkg::DEF_W_W,
  parameter int unsigned SLOPE = seg_pkg::DEF_SLOPE,
  parameter int unsigned PHI_P = seg_pkg::DEF_PHI_P,
  parameter int unsigned PHI_Z = seg_pkg::DEF_PHI_Z,
  parameter int unsigned GROUP = seg_pkg::DEF_GROUP,
  localparam int unsigned LW   = $clog2(ROWS * COLS + 1),
  localparam int unsigned CW   = $clog2(COLS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_col [ROWS][NCH],
  output logic             out_valid,
  output logic [CW-1:0]    out_col,
  output logic             out_last,
  output logic [LW-1:0]    out_labels [ROWS],
  output logic             busy,
  output logic             blk_done,
  output logic [LW-1:0]    seg_count
);

  // stage 1 -> 2
  logic           wc_valid, wc_first, in_first, in_take;
  logic [W_W-1:0] wc_wh [ROWS];
  logic [W_W-1:0] wc_wv [ROWS-1];
  // stage 2 -> 3
  logic           lc_valid, flush;
  logic [W_W-1:0] lc_wh [ROWS];
  logic [W_W-1:0] lc_wv [ROWS-1];
  logic           lc_leader [ROWS];
  // stage 3
  cell_cmd_t       cmd;
  logic [LW-1:0]   seg_num;
  logic [LW-1:0]   ox [ROWS];
  logic            zor, any_cand;
  logic            row_en  [ROWS];
  logic [COLS-1:0] excited [ROWS];
  logic [COLS-1:0] active  [ROWS];
  logic [COLS-1:0] ce      [ROWS];
  logic [LW-1:0]   labels  [ROWS][COLS];
  // stage 4
  logic            out_start, out_shift, out_done;

  assign in_take = in_valid && in_ready;

  weight_calc #(.ROWS(ROWS), .NCH(NCH), .PIX_W(PIX_W), .W_W(W_W),
                .SLOPE(SLOPE)) u_wc (
    .clk, .rst_n,
    .in_valid (in_take), .in_first, .in_col,
    .out_valid(wc_valid), .out_first(wc_first), .wh(wc_wh), .wv(wc_wv)
  );

  leader_calc #(.ROWS(ROWS), .W_W(W_W), .PHI_P(PHI_P)) u_lc (
    .clk, .rst_n,
    .in_valid (wc_valid), .in_first(wc_first), .flush,
    .in_wh (wc_wh), .in_wv (wc_wv),
    .out_valid(lc_valid), .out_wh(lc_wh), .out_wv(lc_wv), .out_leader(lc_leader)
  );

  cell_network #(.ROWS(ROWS), .COLS(COLS), .W_W(W_W), .LW(LW), .PHI_Z(PHI_Z),
                 .GROUP(GROUP)) u_net (
    .clk, .rst_n, .cmd, .seg_num,
    .in_wh(lc_wh), .in_wv(lc_wv), .in_leader(lc_leader),
    .ox, .zor, .any_cand, .row_en, .excited, .active, .ce, .labels
  );

  seg_controller #(.ROWS(ROWS), .COLS(COLS), .LW(LW)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_first,
    .lc_valid, .flush,
    .zor, .any_cand, .cmd, .seg_num,
    .out_start, .out_shift, .out_done,
    .busy, .blk_done, .seg_count
  );

  seg_output #(.ROWS(ROWS), .COLS(COLS), .LW(LW)) u_out (
    .clk, .rst_n, .start(out_start), .ox,
    .shift(out_shift), .done(out_done),
    .out_valid, .out_col, .out_last, .out_labels
  );

endmodule
