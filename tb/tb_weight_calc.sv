// tb_weight_calc: checks the connection-weight stage.
// Streams blocks of random pixel columns (with uniform stretches so that
// large weights occur too, and gaps in in_valid) and compares every
// horizontal and vertical weight with max(0, 255 - 8 * max channel |difference|),
// computed here; the horizontal weights of column 0 must be 0.
`timescale 1ns/1ps
module tb_weight_calc;
  import seg_pkg::*;
  localparam int ROWS = DEF_ROWS, NCH = DEF_NCH, PIX_W = DEF_PIX_W, W_W = DEF_W_W;

  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0;
  logic [PIX_W-1:0] in_col [ROWS][NCH];
  logic out_valid, out_first;
  logic [W_W-1:0] wh [ROWS];
  logic [W_W-1:0] wv [ROWS-1];
  int checks = 0, failures = 0;
  int prev [ROWS][NCH];
  int cur  [ROWS][NCH];

  weight_calc dut (.*);
  always #5 clk = ~clk;

  function automatic int wref(int a [NCH], int b [NCH]);
    int m, d;
    m = 0;
    for (int k = 0; k < NCH; k++) begin
      d = a[k] - b[k];
      if (d < 0) d = -d;
      if (d > m) m = d;
    end
    return (8 * m >= 255) ? 0 : 255 - 8 * m;
  endfunction

  initial begin
    for (int r = 0; r < ROWS; r++) for (int k = 0; k < NCH; k++) in_col[r][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      for (int c = 0; c < 41; c++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) begin
          in_valid = 0;
          for (int r = 0; r < ROWS; r++) for (int k = 0; k < NCH; k++) in_col[r][k] = PIX_W'($urandom);
          @(negedge clk);
        end
        for (int r = 0; r < ROWS; r++)
          for (int k = 0; k < NCH; k++) begin
            if (blk % 2 == 0) cur[r][k] = $urandom % 256;
            else cur[r][k] = 100 + 50 * ((r / 7 + c / 9) % 3) + $urandom % 40;
            in_col[r][k] = PIX_W'(cur[r][k]);
          end
        in_valid = 1;
        in_first = (c == 0);
        #1;
        checks++;
        if (!out_valid || out_first != in_first) begin failures++; $display("FAIL valid/first"); end
        for (int r = 0; r < ROWS; r++) begin
          checks++;
          if (int'(wh[r]) != ((c == 0) ? 0 : wref(cur[r], prev[r]))) begin
            failures++; $display("FAIL blk %0d col %0d row %0d wh=%0d want %0d", blk, c, r, wh[r], wref(cur[r], prev[r]));
          end
        end
        for (int r = 0; r < ROWS - 1; r++) begin
          checks++;
          if (int'(wv[r]) != wref(cur[r], cur[r+1])) begin
            failures++; $display("FAIL blk %0d col %0d row %0d wv=%0d", blk, c, r, wv[r]);
          end
        end
        prev = cur;
      end
    end
    @(negedge clk);
    in_valid = 0;
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
