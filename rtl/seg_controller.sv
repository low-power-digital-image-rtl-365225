// seg_controller: sequencing of one block through the segmentation core.
//
// States and what the cell network is told in each:
//   IDLE   : waits for the first pixel column; when it comes, CMD_CLEAR
//            resets every cell and the column enters the weight stage.
//   LOAD   : takes one column per cycle (in_ready high); every finished
//            column bundle from the leader stage is shifted into the network
//            (CMD_SHIFT). COLS columns are taken in COLS cycles.
//   FLUSH  : one cycle; the leader stage emits the last column (CMD_SHIFT).
//   SELECT : if a free leader cell is left, it excites itself (CMD_SELF);
//            otherwise the block is done and read-out starts.
//   GROW   : while the global inhibitor reports excitable cells (zor = 1),
//            one growing step per cycle (CMD_GROW). When zor = 0 the region
//            is complete: its cells take the segment number and are
//            inhibited (CMD_LABEL), the number is incremented, back to SELECT.
//   OUTPUT : the output stage shifts the results out (CMD_OUTPUT while it
//            asks for it); when it is done, back to IDLE with blk_done.
// A region with g growing steps costs g + 2 cycles (SELECT, g x GROW, the
// GROW cycle that labels); the block ends with one SELECT that finds no
// leader. Segment numbers start at 1; cells left without a segment keep 0.
//
// From the design: region growing started by self-excitation of a leader,
// continued while excitable cells exist, ended by labeling and inhibition
// when the global inhibitor reports none, and a separate output stage.
// This implementation's choice: the state encoding, the load handshake
// (valid/ready), the flush cycle and the numbering from 1.
module seg_controller
  import seg_pkg::*;
#(
  parameter int unsigned ROWS = seg_pkg::DEF_ROWS,
  parameter int unsigned COLS = seg_pkg::DEF_COLS,
  parameter int unsigned LW   = $clog2(ROWS * COLS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // pixel column input handshake
  input  logic          in_valid,
  output logic          in_ready,
  output logic          in_first,     // the column offered now is column 0
  // leader stage
  input  logic          lc_valid,     // a finished column bundle is ready
  output logic          flush,
  // cell network
  input  logic          zor,
  input  logic          any_cand,
  output cell_cmd_t     cmd,
  output logic [LW-1:0] seg_num,
  // output stage
  output logic          out_start,
  input  logic          out_shift,
  input  logic          out_done,
  // status
  output logic          busy,
  output logic          blk_done,     // one-cycle pulse after read-out
  output logic [LW-1:0] seg_count     // segments of the last finished block
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_FLUSH, S_SELECT, S_GROW, S_OUTPUT
  } state_t;

  localparam int unsigned CW = $clog2(COLS + 1);

  state_t        state, state_n;
  logic [CW-1:0] col_cnt;

  assign in_ready = (state == S_IDLE) || (state == S_LOAD);
  assign in_first = (state == S_IDLE);
  assign flush    = (state == S_FLUSH);
  assign busy     = (state != S_IDLE);

  always_comb begin
    state_n   = state;
    cmd       = CMD_HOLD;
    out_start = 1'b0;
    unique case (state)
      S_IDLE: if (in_valid) begin
        cmd     = CMD_CLEAR;
        state_n = (COLS == 1) ? S_FLUSH : S_LOAD;
      end
      S_LOAD: begin
        if (lc_valid) cmd = CMD_SHIFT;
        if (in_valid && col_cnt == CW'(COLS - 1)) state_n = S_FLUSH;
      end
      S_FLUSH: begin
        cmd     = CMD_SHIFT;
        state_n = S_SELECT;
      end
      S_SELECT: begin
        if (any_cand) begin
          cmd     = CMD_SELF;
          state_n = S_GROW;
        end else begin
          out_start = 1'b1;
          state_n   = S_OUTPUT;
        end
      end
      S_GROW: begin
        if (zor) cmd = CMD_GROW;
        else begin
          cmd     = CMD_LABEL;
          state_n = S_SELECT;
        end
      end
      S_OUTPUT: begin
        if (out_shift) cmd = CMD_OUTPUT;
        if (out_done) state_n = S_IDLE;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      col_cnt   <= '0;
      seg_num   <= LW'(1);
      seg_count <= '0;
      blk_done  <= 1'b0;
    end else begin
      state    <= state_n;
      blk_done <= (state == S_OUTPUT) && out_done;
      if (state == S_IDLE && in_valid) begin
        col_cnt <= CW'(1);
        seg_num <= LW'(1);
      end else if (state == S_LOAD && in_valid) begin
        col_cnt <= col_cnt + 1'b1;
      end
      if (cmd == CMD_LABEL) seg_num <= seg_num + 1'b1;
      if (state == S_SELECT && !any_cand) seg_count <= seg_num - 1'b1;
    end
  end

  // Self-excitation needs a candidate; growing only while zor says so.
  a_self_needs_cand: assert property (@(posedge clk) disable iff (!rst_n)
    cmd == CMD_SELF |-> any_cand);
  a_grow_needs_zor: assert property (@(posedge clk) disable iff (!rst_n)
    cmd == CMD_GROW |-> zor);

endmodule
