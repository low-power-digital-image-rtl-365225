// block_sequencer: subdivided-image processing of a whole frame.
//
// A frame of IMG_W x IMG_H pixels is cut into NBX x NBY blocks of COLS x ROWS
// pixels that overlap their neighbours by one pixel column / row, so block
// (bx, by) starts at x0 = bx*(COLS-1), y0 = by*(ROWS-1). The blocks are
// processed one after the other in raster order (left to right, top to
// bottom) by a single segmentation core. For the current block the sequencer
// reads the pixel columns x0 .. x0+COLS-1 from the frame source: it presents
// rd_x and rd_y0, the source answers in the same cycle with the pixels of
// rows rd_y0 .. rd_y0+ROWS-1 of column rd_x, and the sequencer hands the
// column to the core with col_valid/col_ready. Past the frame edge the last
// column is repeated (rd_x is clamped) and rows below the frame repeat the
// last frame row. After the last column of a block the sequencer waits for
// the core's blk_done before the next block; frame_done pulses after the
// last block. bx/by name the block being processed.
//
// From the design: one core working sequentially through 16 x 15 blocks of
// 41 x 33 pixels with one-pixel overlap. This implementation's choice: the
// read interface, the edge replication and the raster order of blocks.
module block_sequencer #(
  parameter int unsigned IMG_W = seg_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = seg_pkg::DEF_IMG_H,
  parameter int unsigned COLS  = seg_pkg::DEF_COLS,
  parameter int unsigned ROWS  = seg_pkg::DEF_ROWS,
  parameter int unsigned NBX   = seg_pkg::DEF_NBX,
  parameter int unsigned NBY   = seg_pkg::DEF_NBY,
  parameter int unsigned NCH   = seg_pkg::DEF_NCH,
  parameter int unsigned PIX_W = seg_pkg::DEF_PIX_W,
  localparam int unsigned XW   = $clog2(IMG_W + COLS),
  localparam int unsigned YW   = $clog2(IMG_H + ROWS),
  localparam int unsigned BXW  = $clog2(NBX + 1),
  localparam int unsigned BYW  = $clog2(NBY + 1),
  localparam int unsigned CW   = $clog2(COLS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,                    // begin a frame
  // frame source
  output logic [XW-1:0]    rd_x,
  output logic [YW-1:0]    rd_y0,
  input  logic [PIX_W-1:0] rd_col  [ROWS][NCH],
  // to the segmentation core
  output logic             col_valid,
  input  logic             col_ready,
  output logic [PIX_W-1:0] col_data [ROWS][NCH],
  input  logic             blk_done,
  // status
  output logic [BXW-1:0]   bx,
  output logic [BYW-1:0]   by,
  output logic [XW-1:0]    x0,
  output logic [YW-1:0]    y0,
  output logic             busy,
  output logic             frame_done
);

  typedef enum logic [1:0] {Q_IDLE, Q_FEED, Q_WAIT} qstate_t;

  qstate_t       state;
  logic [CW-1:0] col;
  logic [XW-1:0] x_raw;

  assign x0    = XW'(bx) * XW'(COLS - 1);
  assign y0    = YW'(by) * YW'(ROWS - 1);
  assign x_raw = x0 + XW'(col);
  assign rd_x  = (x_raw > XW'(IMG_W - 1)) ? XW'(IMG_W - 1) : x_raw;
  assign rd_y0 = y0;

  // rows below the frame repeat the last frame row
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      if (32'(y0) + r > IMG_H - 1) col_data[r] = rd_col[IMG_H - 1 - 32'(y0)];
      else                         col_data[r] = rd_col[r];
    end
  end

  assign col_valid = (state == Q_FEED);
  assign busy      = (state != Q_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= Q_IDLE;
      col        <= '0;
      bx         <= '0;
      by         <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        Q_IDLE: if (start) begin
          bx    <= '0;
          by    <= '0;
          col   <= '0;
          state <= Q_FEED;
        end
        Q_FEED: if (col_ready) begin
          if (col == CW'(COLS - 1)) begin
            col   <= '0;
            state <= Q_WAIT;
          end else begin
            col <= col + 1'b1;
          end
        end
        Q_WAIT: if (blk_done) begin
          if (bx == BXW'(NBX - 1)) begin
            bx <= '0;
            if (by == BYW'(NBY - 1)) begin
              by         <= '0;
              frame_done <= 1'b1;
              state      <= Q_IDLE;
            end else begin
              by    <= by + 1'b1;
              state <= Q_FEED;
            end
          end else begin
            bx    <= bx + 1'b1;
            state <= Q_FEED;
          end
        end
        default: state <= Q_IDLE;
      endcase
    end
  end

  initial begin
    assert ((NBX - 1) * (COLS - 1) + COLS >= IMG_W && (NBY - 1) * (ROWS - 1) + ROWS >= IMG_H)
      else $error("block_sequencer: the blocks do not cover the frame");
  end

endmodule
