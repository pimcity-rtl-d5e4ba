// ll_switch: the transistors that join the logic lines of neighbouring tiles.
//
// Between two neighbouring tiles there is one transistor per logic line: the row
// logic lines (RLL) of east-west neighbours, the column logic lines (CLL) of
// north-south neighbours. Closing them puts the input cells of one tile and the
// output cell of the other on one electrical line, so a gate can cross the tile
// boundary. That much is the document's.
//
// This module models the switches on both sides of one tile along one axis (side
// A = west or north, side B = east or south). Each line carries two facts
// (all input cells are 1, some input cell is 1); a closed switch merges the facts
// of the neighbour into those the tile sees, an open one contributes the identity
// (all = 1, any = 0). Purely combinational.
module ll_switch #(
  parameter int unsigned T = 1024
) (
  input  logic         en_a,
  input  logic [T-1:0] a_all,
  input  logic [T-1:0] a_any,
  input  logic         en_b,
  input  logic [T-1:0] b_all,
  input  logic [T-1:0] b_any,
  output logic [T-1:0] all_o,
  output logic [T-1:0] any_o
);

  always_comb begin
    all_o = (en_a ? a_all : '1) & (en_b ? b_all : '1);
    any_o = (en_a ? a_any : '0) | (en_b ? b_any : '0);
  end

endmodule
