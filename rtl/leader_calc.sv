// leader_calc: second pipeline stage, leader-cell determination.
//
// A leader cell is a seed of region growing. A cell is a leader when the sum
// of the connection weights to its (up to four) neighbours exceeds PHI_P, that
// is, when it lies inside a uniform area. A cell's right-hand weight only
// exists once the next column has arrived, so the stage keeps the weights of
// the previous column and, when column k arrives, emits the finished bundle of
// column k-1: its left weights, its vertical weights and its leader flags.
// After the last column the controller raises flush for one cycle: the right
// weights are then taken as 0 (block border) and the last column is emitted.
// The first column of a block emits nothing, so a block of COLS columns gives
// exactly COLS output bundles. Output is combinational in the inputs and the
// held column.
//
// From the design: leader cells are found from the connection weights in a
// stage of their own, between weight calculation and the cell network.
// This implementation's choice: the rule "sum of neighbour weights > PHI_P",
// missing neighbours at the block border count 0, and the one-column delay.
module leader_calc #(
  parameter int unsigned ROWS  = seg_pkg::DEF_ROWS,
  parameter int unsigned W_W   = seg_pkg::DEF_W_W,
  parameter int unsigned PHI_P = seg_pkg::DEF_PHI_P
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             flush,              // emit the held column, right weights 0
  input  logic [W_W-1:0]   in_wh  [ROWS],
  input  logic [W_W-1:0]   in_wv  [ROWS-1],
  output logic             out_valid,
  output logic [W_W-1:0]   out_wh [ROWS],      // left weights of the emitted column
  output logic [W_W-1:0]   out_wv [ROWS-1],    // vertical weights of the emitted column
  output logic             out_leader [ROWS]
);

  localparam int unsigned SUM_W = W_W + 2;

  logic           held_valid;
  logic [W_W-1:0] held_wh [ROWS];
  logic [W_W-1:0] held_wv [ROWS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_valid <= 1'b0;
      for (int r = 0; r < ROWS; r++) held_wh[r] <= '0;
      for (int r = 0; r < ROWS - 1; r++) held_wv[r] <= '0;
    end else if (in_valid) begin
      held_valid <= 1'b1;
      held_wh    <= in_wh;
      held_wv    <= in_wv;
    end else if (flush) begin
      held_valid <= 1'b0;
    end
  end

  assign out_valid = held_valid && ((in_valid && !in_first) || flush);
  assign out_wh    = held_wh;
  assign out_wv    = held_wv;

  always_comb begin
    logic [SUM_W-1:0] s;
    for (int r = 0; r < ROWS; r++) begin
      s = SUM_W'(held_wh[r]);
      if (!flush)      s = s + SUM_W'(in_wh[r]);
      if (r > 0)       s = s + SUM_W'(held_wv[r-1]);
      if (r < ROWS-1)  s = s + SUM_W'(held_wv[r]);
      out_leader[r] = (32'(s) > PHI_P);
    end
  end

endmodule
