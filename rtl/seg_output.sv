// seg_output: fourth pipeline stage, output of the segmentation result.
//
// After a block is segmented, start launches the read-out. For COLS cycles
// the stage asks the cell network to shift its segment numbers one column
// right (shift = 1) and passes on the row outputs OX_i, which hold the
// column now at the right edge of the network. As the network stores a block
// first-in first-out, this is the block's column 0 in the first cycle and
// column COLS-1 in the last. Each cycle it presents out_valid with the column index
// out_col and the ROWS segment numbers; out_last and done mark the last
// column. Read-out of a block takes exactly COLS cycles, one column per
// cycle, with no back-pressure.
//
// From the design: a separate output stage fed by the row outputs OX_i, and
// the data in/out cost of one cycle per column. This implementation's choice:
// the column framing (index, last flag).
module seg_output #(
  parameter int unsigned ROWS = seg_pkg::DEF_ROWS,
  parameter int unsigned COLS = seg_pkg::DEF_COLS,
  parameter int unsigned LW   = $clog2(ROWS * COLS + 1),
  localparam int unsigned CW  = $clog2(COLS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] ox [ROWS],          // OX_i from the cell network
  output logic          shift,              // read-out shift request
  output logic          done,
  output logic          out_valid,
  output logic [CW-1:0] out_col,
  output logic          out_last,
  output logic [LW-1:0] out_labels [ROWS]
);

  logic          running;
  logic [CW-1:0] col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      col     <= '0;
    end else if (start && !running) begin
      running <= 1'b1;
      col     <= '0;
    end else if (running) begin
      if (col == CW'(COLS - 1)) running <= 1'b0;
      else                      col     <= col + 1'b1;
    end
  end

  assign shift      = running;
  assign out_valid  = running;
  assign out_col    = col;
  assign out_last   = running && (col == CW'(COLS - 1));
  assign done       = out_last;
  assign out_labels = ox;

endmodule
