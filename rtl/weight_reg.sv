// weight_reg: connection-weight register block (WRh_ij between horizontally
// adjacent cells, WRv_ij between vertically adjacent cells).
//
// Holds one connection weight of W_W bits for the whole segmentation of a
// block; the two cells it sits between both read it. During block loading
// the weight registers of a row form a shift chain: with shift high the
// register takes the value of its left neighbour register (or of the loader
// for column 0) on the rising clock edge. At other times it holds, so its
// clock can be gated off. Reset clears it.
//
// From the design: one register block per cell pair, laid between the cells.
// This implementation's choice: row-wise shift loading and the reset value.
module weight_reg #(
  parameter int unsigned W_W = seg_pkg::DEF_W_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift,
  input  logic [W_W-1:0] d,
  output logic [W_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= d;
  end

endmodule
