// tb_clock_controller: checks the row clock enables for every command.
// Random per-row ZOR_i, excited-row and selected-row inputs under each
// command; the expected enable of each row follows the command table
// (all rows for clear/shift/output, ZOR_i while growing, the selected row for
// self-excitation, rows with excited cells for labeling, none on hold).
`timescale 1ns/1ps
module tb_clock_controller;
  import seg_pkg::*;
  localparam int ROWS = DEF_ROWS;

  cell_cmd_t cmd;
  logic zor_row [ROWS], row_exc [ROWS], row_sel [ROWS], row_en [ROWS];
  logic zor, clk_enable;
  int checks = 0, failures = 0;
  int nsel;
  bit want;

  clock_controller dut (.*);

  initial begin
    for (int it = 0; it < 700; it++) begin
      nsel = $urandom % ROWS;
      cmd = cell_cmd_t'(it % 7);
      zor = 1'b0;
      for (int r = 0; r < ROWS; r++) begin
        zor_row[r] = ($urandom % 3) == 0;
        row_exc[r] = ($urandom % 3) == 0;
        row_sel[r] = (r == nsel);
        zor |= zor_row[r];
      end
      #1;
      for (int r = 0; r < ROWS; r++) begin
        case (cmd)
          CMD_CLEAR, CMD_SHIFT, CMD_OUTPUT: want = 1;
          CMD_SELF:  want = (r == nsel);
          CMD_GROW:  want = zor_row[r];
          CMD_LABEL: want = row_exc[r];
          default:   want = 0;
        endcase
        checks++;
        if (row_en[r] !== want) begin
          failures++;
          $display("FAIL cmd=%s row %0d en=%0d want %0d", cmd.name(), r, row_en[r], want);
        end
      end
      checks++;
      if (clk_enable !== zor) begin failures++; $display("FAIL clk_enable"); end
    end
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
