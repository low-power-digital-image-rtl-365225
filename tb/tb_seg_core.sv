// tb_seg_core: checks one-block segmentation through all four stages.
// Runs the core at its default 41 x 33 size on a series of random block
// images (flat colour areas with low noise, some fully random blocks, some
// uniform blocks) and offers the pixel columns with random gaps in
// in_valid. Every read-out column is compared with the reference model;
// also checked: read-out in image column order in COLS consecutive cycles,
// the latency from the last accepted column to the first result column
// (flush + the reference's segmentation cycle count + 1), seg_count, one
// blk_done per block and in_ready low between load and read-out.
`timescale 1ns/1ps
module tb_seg_core;
  import seg_pkg::*;
  import seg_ref_pkg::*;
  localparam int ROWS = DEF_ROWS, COLS = DEF_COLS, NCH = DEF_NCH, PIX_W = DEF_PIX_W;
  localparam int LW = $clog2(ROWS * COLS + 1), CW = $clog2(COLS + 1);

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic [PIX_W-1:0] in_col [ROWS][NCH];
  logic out_valid, out_last, busy, blk_done;
  logic [CW-1:0] out_col;
  logic [LW-1:0] out_labels [ROWS];
  logic [LW-1:0] seg_count;

  seg_core dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0, t_last_in, t_first_out;
  seg_ref #(ROWS, COLS, NCH, DEF_PHI_P, DEF_PHI_Z) ref_m;
  int sx [4], sy [4], colr [4][NCH];
  int best, d, bd, accepted, n_out, n_done, kind, n_regions, n_empty_blocks;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d %s", cyc, what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin accepted <= accepted + 1; t_last_in = cyc; end
    if (blk_done) n_done <= n_done + 1;
    if (rst_n && out_valid) begin
      if (n_out == 0) t_first_out = cyc;
      chk(int'(out_col) == n_out, "column order");
      chk(out_last == (n_out == COLS - 1), "out_last");
      for (int r = 0; r < ROWS; r++)
        chk(int'(out_labels[r]) == ref_m.label[r][n_out],
            $sformatf("label r%0d c%0d = %0d want %0d", r, n_out, out_labels[r], ref_m.label[r][n_out]));
      n_out <= n_out + 1;
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++) for (int k = 0; k < NCH; k++) in_col[r][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 8; blk++) begin
      ref_m = new();
      kind = blk % 4;
      for (int k = 0; k < 4; k++) begin
        sx[k] = $urandom % COLS; sy[k] = $urandom % ROWS;
        for (int ch = 0; ch < NCH; ch++) colr[k][ch] = 10 + 60 * k + $urandom % 30;
      end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          best = 0; bd = 100000;
          for (int k = 0; k < 4; k++) begin
            d = (r - sy[k]) * (r - sy[k]) + (c - sx[k]) * (c - sx[k]);
            if (d < bd) begin bd = d; best = k; end
          end
          for (int ch = 0; ch < NCH; ch++)
            case (kind)
              0, 1: ref_m.pix[r][c][ch] = ($urandom % 20 == 0) ? $urandom % 256 : colr[best][ch] + $urandom % 5;
              2:    ref_m.pix[r][c][ch] = $urandom % 256;
              default: ref_m.pix[r][c][ch] = 128;
            endcase
        end
      ref_m.run();
      n_regions += ref_m.nseg;
      if (ref_m.nseg == 0) n_empty_blocks++;
      accepted = 0; n_out = 0; n_done = 0;
      while (accepted < COLS) begin
        @(negedge clk);
        in_valid = (blk < 2) || ($urandom % 3 != 0);
        for (int r = 0; r < ROWS; r++)
          for (int ch = 0; ch < NCH; ch++) in_col[r][ch] = PIX_W'(ref_m.pix[r][accepted][ch]);
      end
      @(negedge clk);
      in_valid = 0;
      while (n_done == 0 && cyc < 1000000) begin
        @(negedge clk);
        if (n_out == 0 && n_done == 0) chk(!in_ready, "in_ready low while busy");
      end
      chk(n_out == COLS, $sformatf("%0d output columns", n_out));
      chk(t_first_out - t_last_in == longint'(2 + ref_m.seg_cycles),
          $sformatf("block %0d latency %0d want %0d", blk, t_first_out - t_last_in, 2 + ref_m.seg_cycles));
      chk(int'(seg_count) == ref_m.nseg, "seg_count");
      chk(ref_m.internal_errors == 0, "reference consistency");
      @(negedge clk);
      chk(n_done == 1 && !busy, "one blk_done, then idle");
      $display("block %0d: %0d segments, %0d segmentation cycles", blk, ref_m.nseg, ref_m.seg_cycles);
    end
    chk(n_regions > 8 && n_empty_blocks > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
