// tb_global_inhibitor: checks the hierarchical OR of the cell state signals.
// Random sparse state-signal patterns (including all-zero ones and single
// active cells in each row) on the default 33 x 41 array; every row output
// ZOR_i, every group-of-4 output and the global ZOR are compared with OR
// functions computed here.
`timescale 1ns/1ps
module tb_global_inhibitor;
  import seg_pkg::*;
  localparam int ROWS = DEF_ROWS, COLS = DEF_COLS, GROUP = DEF_GROUP;
  localparam int NGRP = (ROWS + GROUP - 1) / GROUP;

  logic [COLS-1:0] z [ROWS];
  logic zor_row [ROWS];
  logic zor_grp [NGRP];
  logic zor;
  int checks = 0, failures = 0;
  int n_zero = 0, n_one = 0;

  global_inhibitor dut (.*);

  task automatic check_all();
    bit any, g;
    any = 0;
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (zor_row[r] !== (z[r] != '0)) begin failures++; $display("FAIL row %0d", r); end
      any |= (z[r] != '0);
    end
    for (int gi = 0; gi < NGRP; gi++) begin
      g = 0;
      for (int r = gi * GROUP; r < ROWS && r < (gi + 1) * GROUP; r++) g |= (z[r] != '0);
      checks++;
      if (zor_grp[gi] !== g) begin failures++; $display("FAIL group %0d", gi); end
    end
    checks++;
    if (zor !== any) begin failures++; $display("FAIL zor=%0d want %0d", zor, any); end
    if (any) n_one++; else n_zero++;
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) z[r] = '0;
    #1 check_all();
    for (int rr = 0; rr < ROWS; rr++)
      for (int cc = 0; cc < COLS; cc += 13) begin
        for (int r = 0; r < ROWS; r++) z[r] = '0;
        z[rr][cc] = 1'b1;
        #1 check_all();
      end
    repeat (300) begin
      for (int r = 0; r < ROWS; r++) begin
        z[r] = '0;
        if ($urandom % 8 == 0) z[r][$urandom % COLS] = 1'b1;
      end
      #1 check_all();
    end
    checks++;
    if (n_zero == 0 || n_one == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
