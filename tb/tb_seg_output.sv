// tb_seg_output: checks the result output stage.
// A behavioural row shift register stands in for the cell network's labels.
// After start the stage must request COLS shifts in COLS consecutive cycles,
// present columns 0 .. COLS-1 with out_valid, pass the row outputs through,
// flag the last column with out_last/done and then go quiet; a start pulse
// while running is ignored.
`timescale 1ns/1ps
module tb_seg_output;
  import seg_pkg::*;
  localparam int ROWS = DEF_ROWS, COLS = DEF_COLS;
  localparam int LW = $clog2(ROWS * COLS + 1), CW = $clog2(COLS + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [LW-1:0] ox [ROWS];
  logic shift, done, out_valid, out_last;
  logic [CW-1:0] out_col;
  logic [LW-1:0] out_labels [ROWS];
  int checks = 0, failures = 0;
  logic [LW-1:0] net [ROWS][COLS];   // network model: column COLS-1 drives ox
  int img [ROWS][COLS];              // image-order labels loaded into it
  int n_valid, t_start;
  longint cyc = 0;

  seg_output dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always_comb for (int r = 0; r < ROWS; r++) ox[r] = net[r][COLS-1];
  always @(posedge clk)
    if (shift)
      for (int r = 0; r < ROWS; r++) begin
        for (int c = COLS - 1; c > 0; c--) net[r][c] <= net[r][c-1];
        net[r][0] <= '0;
      end

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) net[r][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 4; blk++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          img[r][c] = $urandom % (ROWS * COLS);
          net[r][COLS-1-c] = LW'(img[r][c]);
        end
      repeat ($urandom % 4) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      n_valid = 0;
      for (int k = 0; k < COLS + 3; k++) begin
        if (k == 5) start = 1;   // ignored while running
        #1;
        if (k < COLS) begin
          checks += 3;
          if (!out_valid || !shift) begin failures++; $display("FAIL blk %0d k %0d not valid", blk, k); end
          if (int'(out_col) != k) begin failures++; $display("FAIL col %0d want %0d", out_col, k); end
          if ((out_last != (k == COLS - 1)) || (done != out_last)) begin failures++; $display("FAIL last/done"); end
          for (int r = 0; r < ROWS; r++) begin
            checks++;
            if (int'(out_labels[r]) != img[r][k]) begin failures++; $display("FAIL label r%0d c%0d", r, k); end
          end
          if (out_valid) n_valid++;
        end else begin
          checks++;
          if (out_valid || shift || done) begin failures++; $display("FAIL still running"); end
        end
        @(negedge clk);
        start = 0;
      end
      checks++;
      if (n_valid != COLS) begin failures++; $display("FAIL %0d output cycles", n_valid); end
    end
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
