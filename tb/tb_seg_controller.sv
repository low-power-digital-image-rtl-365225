// tb_seg_controller: checks the block sequencing against a scripted network.
// The testbench stands in for the other stages: it offers COLS columns with
// random gaps, raises lc_valid as the leader stage would (for every accepted
// column but the first), and plays a cell network holding a random number of
// regions, each needing a random number of growing steps (any_cand while
// regions are left, zor while the current region still grows). The output
// stage is modelled as COLS shift cycles after out_start. Checked: in_ready
// only while loading, CMD_CLEAR on the first column, exactly COLS shift
// commands (the last in the flush cycle), SELF only with a candidate, GROW
// exactly as often as scripted, LABEL with segment numbers 1, 2, ..., the
// cycle count g + 2 per region plus 1, COLS output shifts, blk_done once and
// seg_count equal to the number of regions.
`timescale 1ns/1ps
module tb_seg_controller;
  import seg_pkg::*;
  localparam int ROWS = DEF_ROWS, COLS = DEF_COLS;
  localparam int LW = $clog2(ROWS * COLS + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_first, lc_valid, flush;
  logic zor, any_cand, out_start, out_shift, out_done, busy, blk_done;
  cell_cmd_t cmd;
  logic [LW-1:0] seg_num, seg_count;

  seg_controller dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int accepted, regions_left, steps_left, steps [$];
  int n_shift, n_clear, n_self, n_grow, n_label, n_out, n_done, next_seg, out_left;
  longint t_last_in, t_done, expect_seg;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d %s", cyc, what); end
  endtask

  // environment models (updated with non-blocking assignments, like the DUT)
  assign lc_valid  = in_valid && in_ready && !in_first && accepted > 0;
  assign any_cand  = regions_left > 0 && steps_left < 0;
  assign zor       = steps_left > 0;
  assign out_shift = out_left > 0;
  assign out_done  = out_left == 1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin accepted <= accepted + 1; t_last_in = cyc; end
      case (cmd)
        CMD_CLEAR: begin n_clear++; chk(in_first && accepted == 0, "clear on first column"); end
        CMD_SHIFT: n_shift++;
        CMD_SELF: begin
          n_self++;
          chk(any_cand, "self without candidate");
          steps_left <= steps.pop_front();
        end
        CMD_GROW: begin n_grow++; chk(steps_left > 0, "grow without zor"); steps_left <= steps_left - 1; end
        CMD_LABEL: begin
          n_label++;
          chk(steps_left == 0, "label while growing");
          chk(int'(seg_num) == next_seg, $sformatf("segment number %0d want %0d", seg_num, next_seg));
          next_seg++;
          regions_left <= regions_left - 1;
          steps_left   <= -1;
        end
        CMD_OUTPUT: begin n_out++; chk(out_left > 0, "output shift"); end
        default: ;
      endcase
      if (flush) chk(cmd == CMD_SHIFT, "shift in flush cycle");
      if (out_start) out_left <= COLS;
      else if (out_left > 0) out_left <= out_left - 1;
      if (blk_done) begin n_done++; t_done = cyc; end
    end
  end

  initial begin
    int nreg, total_g;
    out_left = 0;
    steps_left = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 12; blk++) begin
      nreg = (blk == 0) ? 0 : $urandom % 6;
      total_g = 0;
      steps.delete();
      for (int k = 0; k < nreg; k++) begin
        steps.push_back((blk == 1 && k == 0) ? 0 : $urandom % 30);
        total_g += steps[k];
      end
      accepted = 0; n_shift = 0; n_clear = 0; n_self = 0; n_grow = 0; n_label = 0;
      n_out = 0; n_done = 0; next_seg = 1; regions_left = nreg; steps_left = -1;
      while (accepted < COLS) begin
        @(negedge clk);
        in_valid = ($urandom % 3) != 0;
        #1;
        if (accepted < COLS) chk(in_ready, "in_ready while loading");
      end
      @(negedge clk);
      in_valid = 0;
      expect_seg = total_g + 2 * nreg + 1;
      while (n_done == 0) begin
        @(negedge clk);
        if (n_label < nreg) chk(!in_ready, "in_ready low while segmenting");
        if (cyc > 100000) break;
      end
      // blk_done comes one cycle after the last output shift
      chk(t_done - t_last_in == 1 + expect_seg + COLS + 1,
          $sformatf("block %0d: %0d cycles from last column to blk_done, want %0d",
                    blk, t_done - t_last_in, 1 + expect_seg + COLS + 1));
      chk(n_clear == 1, "one clear");
      chk(n_shift == COLS, $sformatf("%0d shifts", n_shift));
      chk(n_self == nreg && n_label == nreg, "one self and one label per region");
      chk(n_grow == total_g, "grow steps");
      chk(n_out == COLS, "output shifts");
      chk(int'(seg_count) == nreg, "seg_count");
      @(negedge clk);
      chk(n_done == 1 && !busy && in_ready, "one blk_done, idle");
      repeat ($urandom % 3) @(negedge clk);
    end
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
