// weight_calc: first pipeline stage, connection-weight calculation.
//
// A block enters one pixel column per cycle (ROWS pixels of NCH channels).
// For each column the stage produces the horizontal weights between this
// column and the previous one (one per row, WRh) and the vertical weights
// between vertically adjacent pixels of this column (ROWS-1 of them, WRv).
// A weight is large for similar pixels and drops steeply to 0 across an edge:
//   d = max over channels of |p - q|
//   W = max(0, 2^W_W - 1 - SLOPE * d)
// The steep fall keeps the sum of several weak weights (a cell touched by a
// region on two or three sides across an edge) below the excitation
// threshold.
// The previous column is kept in a register; the weights of the current
// column are combinational in the input, so out_* is valid in the same cycle
// as in_valid. With in_first set (column 0 of a block) the horizontal weights
// are 0, as there is no left neighbour.
//
// From the design: weights come from the luminance (RGB) differences of
// neighbouring pixels, horizontal and vertical weights are kept apart.
// This implementation's choice: the formula above (max of the channel
// differences, clamped linear), the widths and the zero weight at the block
// border.
module weight_calc #(
  parameter int unsigned ROWS  = seg_pkg::DEF_ROWS,
  parameter int unsigned NCH   = seg_pkg::DEF_NCH,
  parameter int unsigned PIX_W = seg_pkg::DEF_PIX_W,
  parameter int unsigned W_W   = seg_pkg::DEF_W_W,
  parameter int unsigned SLOPE = seg_pkg::DEF_SLOPE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,                        // column 0 of a block
  input  logic [PIX_W-1:0]     in_col [ROWS][NCH],              // pixel column
  output logic                 out_valid,
  output logic                 out_first,
  output logic [W_W-1:0]       wh     [ROWS],                   // weight to left neighbour
  output logic [W_W-1:0]       wv     [ROWS-1]                  // weight row r <-> row r+1
);

  logic [PIX_W-1:0] prev_col [ROWS][NCH];

  localparam int unsigned PW = PIX_W + $clog2(SLOPE + 1);

  function automatic logic [W_W-1:0] weight(input logic [PIX_W-1:0] a [NCH],
                                            input logic [PIX_W-1:0] b [NCH]);
    logic [PIX_W-1:0] d, m;
    logic [PW-1:0]    p;
    m = '0;
    for (int k = 0; k < NCH; k++) begin
      d = (a[k] > b[k]) ? a[k] - b[k] : b[k] - a[k];
      if (d > m) m = d;
    end
    p = PW'(m) * PW'(SLOPE);
    return (p >= PW'({W_W{1'b1}})) ? '0 : {W_W{1'b1}} - W_W'(p);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int k = 0; k < NCH; k++) prev_col[r][k] <= '0;
    end else if (in_valid) begin
      prev_col <= in_col;
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      wh[r] = in_first ? '0 : weight(in_col[r], prev_col[r]);
    for (int r = 0; r < ROWS - 1; r++)
      wv[r] = weight(in_col[r], in_col[r+1]);
  end

  assign out_valid = in_valid;
  assign out_first = in_first;

endmodule
