// tb_block_sequencer: checks the block walk over a frame.
// A small frame (20 x 14 pixels, blocks of 7 x 5 with one-pixel overlap,
// 4 x 4 blocks, so the last block column and row stick out of the frame) is
// served by a source model that returns junk for rows below the frame. A
// core model accepts columns with random stalls and answers each block with
// blk_done after a random delay. Checked: blocks in raster order, columns
// 0 .. COLS-1 of each block, every pixel equal to the frame pixel at the
// clamped coordinates, no column offered while waiting for blk_done, one
// frame_done after the last block; and that clamping and row repetition
// were both exercised. Two frames are run back to back.
`timescale 1ns/1ps
module tb_block_sequencer;
  localparam int IMG_W = 20, IMG_H = 14, COLS = 7, ROWS = 5, NBX = 4, NBY = 4;
  localparam int NCH = 3, PIX_W = 8;
  localparam int XW = $clog2(IMG_W + COLS), YW = $clog2(IMG_H + ROWS);

  logic clk = 0, rst_n = 0, start = 0;
  logic [XW-1:0] rd_x, x0;
  logic [YW-1:0] rd_y0, y0;
  logic [PIX_W-1:0] rd_col [ROWS][NCH];
  logic col_valid, col_ready = 0, blk_done = 0, busy, frame_done;
  logic [PIX_W-1:0] col_data [ROWS][NCH];
  logic [$clog2(NBX+1)-1:0] bx;
  logic [$clog2(NBY+1)-1:0] by;

  block_sequencer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .COLS(COLS), .ROWS(ROWS),
                    .NBX(NBX), .NBY(NBY), .NCH(NCH), .PIX_W(PIX_W)) dut (.*);
  always #5 clk = ~clk;

  function automatic int fpix(int x, int y, int ch);
    return (x * 11 + y * 29 + ch * 7) % 256;
  endfunction

  always_comb
    for (int r = 0; r < ROWS; r++)
      for (int ch = 0; ch < NCH; ch++)
        rd_col[r][ch] = (int'(rd_y0) + r < IMG_H) ? PIX_W'(fpix(int'(rd_x), int'(rd_y0) + r, ch)) : 8'hEE;

  int checks = 0, failures = 0;
  int blk, col, n_fd, n_clamp, n_repeat, x, y, frames;
  bit waiting;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // core model
  always @(posedge clk) begin
    if (rst_n && col_valid && col_ready) begin
      chk(!waiting, "column offered while the block is being processed");
      chk(int'(bx) == blk % NBX && int'(by) == blk / NBX, $sformatf("block order: (%0d,%0d) at block %0d", bx, by, blk));
      chk(int'(x0) == int'(bx) * (COLS - 1) && int'(y0) == int'(by) * (ROWS - 1), "block origin");
      for (int r = 0; r < ROWS; r++)
        for (int ch = 0; ch < NCH; ch++) begin
          x = int'(bx) * (COLS - 1) + col;
          y = int'(by) * (ROWS - 1) + r;
          if (x > IMG_W - 1) begin x = IMG_W - 1; n_clamp++; end
          if (y > IMG_H - 1) begin y = IMG_H - 1; n_repeat++; end
          chk(int'(col_data[r][ch]) == fpix(x, y, ch), $sformatf("pixel block %0d col %0d row %0d", blk, col, r));
        end
      col++;
      if (col == COLS) begin col = 0; waiting = 1; end
    end
    if (rst_n && frame_done) n_fd++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (frames = 0; frames < 2; frames++) begin
      blk = 0; col = 0; waiting = 0; n_fd = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (blk < NBX * NBY) begin
        col_ready = ($urandom % 4) != 0;
        @(negedge clk);
        if (waiting) begin
          col_ready = 0;
          repeat ($urandom % 5) @(negedge clk);
          chk(!col_valid, "no column while waiting");
          blk_done = 1;
          @(negedge clk);
          blk_done = 0;
          waiting = 0;
          blk++;
        end
      end
      @(negedge clk);
      chk(n_fd == 1, $sformatf("frame_done count %0d", n_fd));
      chk(!busy, "idle after the frame");
    end
    chk(n_clamp > 0 && n_repeat > 0, "edge handling exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
