// tb_cell_network: checks the region-growing array on random block images.
// A 10 x 9 network (three inhibitor groups, the last one partial) is loaded
// with the weights and leader flags the reference model computes for a
// random image (a few flat colour areas with low noise and scattered outlier
// pixels). The testbench then plays the controller: self-excite while a free
// leader exists, grow while zor is high, label when it drops. Checked every
// growing cycle: a cell is active exactly when it is free and has an excited
// neighbour, a row's clock is on exactly when it holds an excitable cell
// (and ce = row clock and active), rows are gated off while growing goes on.
// After segmentation every label must equal the reference, the number of
// cycles must match the reference's count, and the read-out must deliver the
// labels on OX_i column by column in image order.
`timescale 1ns/1ps
module tb_cell_network;
  import seg_pkg::*;
  import seg_ref_pkg::*;
  localparam int ROWS = 10, COLS = 9, NCH = 3, W_W = 8, GROUP = 4;
  localparam int LW = $clog2(ROWS * COLS + 1);

  logic clk = 0, rst_n = 0;
  cell_cmd_t cmd = CMD_HOLD;
  logic [LW-1:0] seg_num = '0;
  logic [W_W-1:0] in_wh [ROWS];
  logic [W_W-1:0] in_wv [ROWS-1];
  logic in_leader [ROWS];
  logic [LW-1:0] ox [ROWS];
  logic zor, any_cand;
  logic row_en [ROWS];
  logic [COLS-1:0] excited [ROWS], active [ROWS], ce [ROWS];
  logic [LW-1:0] labels [ROWS][COLS];

  cell_network #(.ROWS(ROWS), .COLS(COLS), .W_W(W_W), .LW(LW), .PHI_Z(DEF_PHI_Z),
                 .GROUP(GROUP)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  seg_ref #(ROWS, COLS, NCH, DEF_PHI_P, DEF_PHI_Z) ref_m;
  int sx [3], sy [3], col [3][NCH];
  int best, d, bd, cycles, seg, n_gated, n_regions, n_unlab, nb, e_row;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic bit is_exc(int r, int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return 0;
    return excited[r][c];
  endfunction

  // BAO checks on the current growing cycle
  task automatic check_grow_cycle();
    int en_rows;
    en_rows = 0;
    for (int r = 0; r < ROWS; r++) begin
      e_row = 0;
      for (int c = 0; c < COLS; c++) begin
        nb = is_exc(r-1, c) | is_exc(r+1, c) | is_exc(r, c-1) | is_exc(r, c+1);
        chk(active[r][c] == (!excited[r][c] && labels[r][c] == 0 && nb), "active = free with excited neighbour");
        chk(ce[r][c] == (row_en[r] && active[r][c]), "cell clock enable");
      end
      if (row_en[r]) en_rows++;
    end
    if (en_rows > 0 && en_rows < ROWS) n_gated++;
    chk(zor == (en_rows > 0), "zor agrees with the row clocks");
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) begin in_wh[r] = '0; in_leader[r] = 0; end
    for (int r = 0; r < ROWS - 1; r++) in_wv[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 10; blk++) begin
      ref_m = new();
      for (int k = 0; k < 3; k++) begin
        sx[k] = $urandom % COLS; sy[k] = $urandom % ROWS;
        for (int ch = 0; ch < NCH; ch++) col[k][ch] = 20 + 70 * k + $urandom % 20;
      end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          best = 0; bd = 1000;
          for (int k = 0; k < 3; k++) begin
            d = (r - sy[k]) * (r - sy[k]) + (c - sx[k]) * (c - sx[k]);
            if (d < bd) begin bd = d; best = k; end
          end
          for (int ch = 0; ch < NCH; ch++)
            ref_m.pix[r][c][ch] = ($urandom % 10 == 0) ? $urandom % 256 : col[best][ch] + $urandom % 5;
        end
      ref_m.run();
      // load: clear, then COLS shifts, image column 0 first
      @(negedge clk); cmd = CMD_CLEAR;
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        cmd = CMD_SHIFT;
        for (int r = 0; r < ROWS; r++) begin
          in_wh[r] = W_W'(ref_m.wh[r][c]);
          in_leader[r] = ref_m.leader[r][c];
        end
        for (int r = 0; r < ROWS - 1; r++) in_wv[r] = W_W'(ref_m.wv[r][c]);
      end
      // segmentation
      cycles = 0; seg = 1;
      forever begin
        @(negedge clk);
        cycles++;
        if (!any_cand) begin cmd = CMD_HOLD; break; end
        cmd = CMD_SELF;
        forever begin
          @(negedge clk);
          cycles++;
          if (zor) begin cmd = CMD_GROW; #1 check_grow_cycle(); end
          else begin cmd = CMD_LABEL; seg_num = LW'(seg); seg++; break; end
        end
      end
      chk(cycles == ref_m.seg_cycles, $sformatf("block %0d: %0d cycles, want %0d", blk, cycles, ref_m.seg_cycles));
      chk(ref_m.internal_errors == 0, "reference consistency");
      n_regions += ref_m.nseg;
      @(negedge clk);
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          chk(int'(labels[r][COLS-1-c]) == ref_m.label[r][c],
              $sformatf("block %0d label r%0d c%0d = %0d want %0d", blk, r, c, labels[r][COLS-1-c], ref_m.label[r][c]));
          if (ref_m.label[r][c] == 0) n_unlab++;
        end
      // read-out through OX_i
      for (int c = 0; c < COLS; c++) begin
        cmd = CMD_OUTPUT;
        #1;
        for (int r = 0; r < ROWS; r++)
          chk(int'(ox[r]) == ref_m.label[r][c], $sformatf("OX row %0d column %0d", r, c));
        @(negedge clk);
      end
      cmd = CMD_HOLD;
    end
    $display("regions %0d, unlabeled cells %0d, gated growing cycles %0d", n_regions, n_unlab, n_gated);
    chk(n_regions > 10 && n_unlab > 0 && n_gated > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
