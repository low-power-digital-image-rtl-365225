// tb_vga_seg_top: end-to-end test of the VGA segmenter at its default size.
//
// Segments one full 640 x 480 frame (16 x 15 blocks of 41 x 33 pixels). The
// frame source is a model that computes the test image from a formula; below
// the frame bottom it returns junk, which the design must not use. For every
// block the read-out (all 41 columns x 33 rows of segment numbers) is
// compared with the reference model run on the same block, with frame
// coordinates clamped at the right and bottom edge. Also checked: the
// columns come out in order 0 .. COLS-1 in consecutive cycles; each block
// takes COLS input cycles, one flush cycle, the reference's segmentation
// cycle count and COLS output cycles; the frame ends with frame_done after
// 240 blocks. Every mechanism of the design is counted and must occur:
// block clear, load shift, flush, self-excitation, growing, labeling, end of
// growing by the global inhibitor, a growing cycle with some rows clock-gated,
// cells in stand-by while growing, unsegmented cells, the right-edge clamp,
// the bottom-row repeat and the advance to a new block row. The frame must
// also stay within the rate budget of 7.49 ms at 10 MHz (74,900 cycles) with
// at most 230 segmentation cycles (23 us) per block on average, and fewer
// than a quarter of the cell-cycles may be clocked during segmentation.
`timescale 1ns/1ps
module tb_vga_seg_top;
  import seg_pkg::*;
  import seg_ref_pkg::*;

  localparam int IMG_W = DEF_IMG_W, IMG_H = DEF_IMG_H;
  localparam int COLS = DEF_COLS, ROWS = DEF_ROWS, NBX = DEF_NBX, NBY = DEF_NBY;
  localparam int NCH = DEF_NCH, PIX_W = DEF_PIX_W;
  localparam int XW = $clog2(IMG_W + COLS), YW = $clog2(IMG_H + ROWS);
  localparam int LW = $clog2(ROWS * COLS + 1), CW = $clog2(COLS + 1);
  localparam int SEED = 1;
  localparam longint WATCHDOG = 3_000_000;

  logic             clk = 0, rst_n = 0, start = 0;
  logic             busy, frame_done, out_valid, out_last;
  logic [XW-1:0]    rd_x, out_x;
  logic [YW-1:0]    rd_y0, out_y0;
  logic [PIX_W-1:0] rd_col [ROWS][NCH];
  logic [$clog2(NBX+1)-1:0] out_bx;
  logic [$clog2(NBY+1)-1:0] out_by;
  logic [CW-1:0]    out_col;
  logic [LW-1:0]    out_labels [ROWS];
  logic [LW-1:0]    seg_count;

  vga_seg_top dut (.*);

  always #5 clk = ~clk;

  // frame source model
  always_comb
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < NCH; k++)
        rd_col[r][k] = (int'(rd_y0) + r < IMG_H) ? PIX_W'(test_pixel(int'(rd_x), int'(rd_y0) + r, k, SEED))
                                                  : PIX_W'(8'hA5 ^ (r * 7));

  int checks = 0, failures = 0;
  longint cyc = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // mechanism counters
  int n_clear, n_shift, n_flush, n_self, n_grow, n_label, n_zor_end, n_row_gated;
  longint n_standby, n_grow_cells, n_ce_seg, n_cell_seg_cycles;
  int n_unlabeled, n_xclamp, n_yrepl, n_rowadv, n_blocks, n_frame_done;
  longint seg_cycle_sum;

  cell_cmd_t c;
  int en_rows;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      c = dut.u_core.u_net.cmd;
      en_rows = 0;
      if (c == CMD_CLEAR) n_clear++;
      if (c == CMD_SHIFT) n_shift++;
      if (dut.u_core.u_ctrl.flush) n_flush++;
      if (c == CMD_SELF)  n_self++;
      if (c == CMD_LABEL) n_label++;
      if (c == CMD_GROW) begin
        n_grow++;
        for (int r = 0; r < ROWS; r++) begin
          if (dut.u_core.u_net.row_en[r]) en_rows++;
          for (int k = 0; k < COLS; k++) begin
            if (!dut.u_core.u_net.active[r][k]) n_standby++;
            n_grow_cells++;
          end
        end
        if (en_rows > 0 && en_rows < ROWS) n_row_gated++;
      end
      if (c == CMD_LABEL && !dut.u_core.u_net.zor) n_zor_end++;
      if (c inside {CMD_SELF, CMD_GROW, CMD_LABEL}) begin
        for (int r = 0; r < ROWS; r++) n_ce_seg += $countones(dut.u_core.u_net.ce[r]);
        n_cell_seg_cycles += ROWS * COLS;
      end
      if (dut.u_seq.col_valid && dut.u_seq.x_raw > XW'(IMG_W - 1)) n_xclamp++;
      if (frame_done) n_frame_done++;
    end
  end

  // per-block result collection and comparison
  seg_ref #(ROWS, COLS, NCH, DEF_PHI_P, DEF_PHI_Z) ref_m;
  int got [ROWS][COLS];
  int expect_col;
  int px, py, bad;
  longint t_first_in;
  bit     in_block;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_seq.col_valid && dut.u_seq.col_ready && dut.u_seq.col == 0) begin
        t_first_in = cyc;
        expect_col = 0;
        in_block   = 1;
      end
      if (out_valid) begin
        check(out_col == CW'(expect_col), $sformatf("column order: got %0d want %0d", out_col, expect_col));
        if (expect_col == 0) begin
          ref_m = new();
          for (int r = 0; r < ROWS; r++)
            for (int k = 0; k < COLS; k++)
              for (int ch = 0; ch < NCH; ch++) begin
                px = int'(out_bx) * (COLS - 1) + k;
                py = int'(out_by) * (ROWS - 1) + r;
                ref_m.pix[r][k][ch] = test_pixel(px > IMG_W - 1 ? IMG_W - 1 : px,
                                                 py > IMG_H - 1 ? IMG_H - 1 : py, ch, SEED);
              end
          ref_m.run();
          check(ref_m.internal_errors == 0, "reference round/sweep disagree");
          check(cyc - t_first_in == longint'(COLS + 1 + ref_m.seg_cycles),
                $sformatf("block (%0d,%0d) latency %0d want %0d", out_bx, out_by,
                          cyc - t_first_in, COLS + 1 + ref_m.seg_cycles));
          seg_cycle_sum += ref_m.seg_cycles;
          if (int'(out_by) * (ROWS - 1) + ROWS > IMG_H) n_yrepl++;
          if (out_bx == 0 && out_by != 0) n_rowadv++;
        end
        check(out_x == XW'(int'(out_bx) * (COLS - 1) + int'(out_col)), "out_x");
        for (int r = 0; r < ROWS; r++) got[r][out_col] = int'(out_labels[r]);
        expect_col++;
        if (out_last) begin
          bad = 0;
          for (int r = 0; r < ROWS; r++)
            for (int k = 0; k < COLS; k++) begin
              if (got[r][k] == 0) n_unlabeled++;
              if (got[r][k] != ref_m.label[r][k]) bad++;
            end
          check(bad == 0, $sformatf("block (%0d,%0d): %0d labels differ", out_bx, out_by, bad));
          check(expect_col == COLS, "column count");
          n_blocks++;
          in_block = 0;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (frame_done);
    repeat (3) @(posedge clk);
    check(n_blocks == NBX * NBY, $sformatf("blocks %0d", n_blocks));
    check(!busy, "idle after frame");
    check(n_frame_done == 1, "one frame_done");
    $display("frame: %0d blocks, %0d cycles, average segmentation %0d cycles/block, %0d regions",
             n_blocks, cyc, seg_cycle_sum / (n_blocks > 0 ? n_blocks : 1), n_self);
    $display("BAO: %0d of %0d cell-cycles clocked during segmentation (%0.2f%%)",
             n_ce_seg, n_cell_seg_cycles, 100.0 * n_ce_seg / (n_cell_seg_cycles > 0 ? n_cell_seg_cycles : 1));
    $display("mechanisms: clear=%0d shift=%0d flush=%0d self=%0d grow=%0d label=%0d zor_end=%0d row_gated=%0d",
             n_clear, n_shift, n_flush, n_self, n_grow, n_label, n_zor_end, n_row_gated);
    $display("            standby_cell_cycles=%0d/%0d unlabeled=%0d xclamp=%0d yrepeat=%0d rowadv=%0d",
             n_standby, n_grow_cells, n_unlabeled, n_xclamp, n_yrepl, n_rowadv);
    check(n_clear == NBX * NBY, "clear per block");
    check(n_shift == NBX * NBY * COLS, "COLS shifts per block");
    check(n_flush == NBX * NBY, "flush per block");
    check(n_self > 0, "self-excitation happened");
    check(n_grow > 0, "growing happened");
    check(n_label == n_self, "one label per region");
    check(n_zor_end == n_label, "growing ended by the global inhibitor");
    check(n_row_gated > 0, "row clock gating happened");
    check(n_standby > 0, "stand-by cells during growing");
    check(n_unlabeled > 0, "unsegmented cells");
    check(n_xclamp > 0, "right-edge clamp");
    check(n_yrepl > 0, "bottom-row repeat");
    check(n_rowadv == NBY - 1, "block-row advances");
    // Rate budget at a 10 MHz clock: 23 us (230 cycles) average segmentation
    // per block and 7.49 ms (74,900 cycles) for the frame including data in/out.
    check(seg_cycle_sum <= 230 * n_blocks, $sformatf("average segmentation %0d cycles > 230", seg_cycle_sum / (n_blocks > 0 ? n_blocks : 1)));
    check(cyc <= 74_900, $sformatf("frame took %0d cycles > 74900", cyc));
    // Boundary-active-only: most cells are unclocked while regions grow.
    check(n_ce_seg * 4 < n_cell_seg_cycles, "fewer than a quarter of cell-cycles clocked during segmentation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
