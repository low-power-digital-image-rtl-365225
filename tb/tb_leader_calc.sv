// tb_leader_calc: checks the leader-cell stage.
// Feeds blocks of COLS weight columns (random weights, mostly high so that
// both leaders and non-leaders occur, with gaps in in_valid), then one flush
// cycle. The stage must emit exactly COLS bundles, column 0 first, each
// carrying the weights of its column and leader flags equal to
// "sum of the weights to the existing neighbours > PHI_P", computed here with
// the block border counting 0.
`timescale 1ns/1ps
module tb_leader_calc;
  import seg_pkg::*;
  localparam int ROWS = DEF_ROWS, W_W = DEF_W_W, COLS = DEF_COLS, PHI_P = DEF_PHI_P;

  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, flush = 0;
  logic [W_W-1:0] in_wh [ROWS];
  logic [W_W-1:0] in_wv [ROWS-1];
  logic out_valid;
  logic [W_W-1:0] out_wh [ROWS];
  logic [W_W-1:0] out_wv [ROWS-1];
  logic out_leader [ROWS];
  int checks = 0, failures = 0;
  int wh [ROWS][COLS];
  int wv [ROWS][COLS];
  int n_out, n_lead, n_nolead, s;

  leader_calc dut (.*);
  always #5 clk = ~clk;

  // compare the bundle on the outputs with column c of the block
  task automatic check_bundle(int c);
    for (int r = 0; r < ROWS; r++) begin
      s = wh[r][c] + ((c < COLS - 1) ? wh[r][c+1] : 0)
        + ((r > 0) ? wv[r-1][c] : 0) + ((r < ROWS - 1) ? wv[r][c] : 0);
      checks++;
      if (out_leader[r] != (s > PHI_P)) begin
        failures++; $display("FAIL col %0d row %0d leader=%0d sum=%0d", c, r, out_leader[r], s);
      end
      if (s > PHI_P) n_lead++; else n_nolead++;
      checks++;
      if (int'(out_wh[r]) != wh[r][c]) begin failures++; $display("FAIL wh col %0d row %0d", c, r); end
      if (r < ROWS - 1) begin
        checks++;
        if (int'(out_wv[r]) != wv[r][c]) begin failures++; $display("FAIL wv col %0d row %0d", c, r); end
      end
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) in_wh[r] = '0;
    for (int r = 0; r < ROWS - 1; r++) in_wv[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 5; blk++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          wh[r][c] = (c == 0) ? 0 : (($urandom % 4 == 0) ? $urandom % 256 : 190 + $urandom % 66);
          wv[r][c] = (r == ROWS - 1) ? 0 : (($urandom % 4 == 0) ? $urandom % 256 : 190 + $urandom % 66);
        end
      n_out = 0;
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) begin
          in_valid = 0;
          #1;
          checks++;
          if (out_valid) begin failures++; $display("FAIL output without input"); end
          @(negedge clk);
        end
        in_valid = 1;
        in_first = (c == 0);
        for (int r = 0; r < ROWS; r++) in_wh[r] = W_W'(wh[r][c]);
        for (int r = 0; r < ROWS - 1; r++) in_wv[r] = W_W'(wv[r][c]);
        #1;
        checks++;
        if (out_valid != (c > 0)) begin failures++; $display("FAIL out_valid at col %0d", c); end
        if (out_valid) begin check_bundle(c - 1); n_out++; end
      end
      @(negedge clk);
      in_valid = 0;
      flush = 1;
      for (int r = 0; r < ROWS; r++) in_wh[r] = W_W'($urandom);   // must be ignored
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no output on flush"); end
      else begin check_bundle(COLS - 1); n_out++; end
      @(negedge clk);
      flush = 0;
      #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL output after flush"); end
      checks++;
      if (n_out != COLS) begin failures++; $display("FAIL %0d bundles", n_out); end
    end
    checks++;
    if (n_lead == 0 || n_nolead == 0) begin failures++; $display("FAIL coverage"); end
    $display("leaders %0d, non-leaders %0d", n_lead, n_nolead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
