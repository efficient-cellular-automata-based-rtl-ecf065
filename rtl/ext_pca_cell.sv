// ext_pca_cell: combinational logic (CL) of one extended programmable
// cellular-automaton cell.
//
// The cell's next state is the XOR of three neighbours, each passed through an
// AND "switch" set by a control signal:
//   x_next = (cl & x_left) ^ (cm & x_bound) ^ (cr & x_rmost)
// x_left is the nearest cell to the left (c_{j-1}), x_bound the bit entering at
// the left boundary of the array (a coefficient of A), and x_rmost the rightmost
// cell of the array (c_{m-1}). Unlike a standard three-neighbour cell, the
// neighbours are not the cell itself and its two nearest cells: two of them are
// shared lines running the width of the array.
//
// In the multiplier cl is tied to 1, cm carries b_j and cr carries p_j, which
// gives the rule c_j <= c_{m-1} p_j ^ c_{j-1} ^ a b_j. The three neighbours and
// their control switches follow the published cell; realising each switch as
// an AND gate is this design's choice. Purely combinational, no clock.
module ext_pca_cell (
  input  logic cl,       // enable nearest-left neighbour
  input  logic cm,       // enable left-boundary input
  input  logic cr,       // enable rightmost-cell input
  input  logic x_left,   // c_{j-1} (0 for the leftmost cell)
  input  logic x_bound,  // a_{m-1-i} from the left boundary
  input  logic x_rmost,  // c_{m-1} from the rightmost cell
  output logic x_next    // next state of this cell
);

  always_comb begin
    x_next = (cl & x_left) ^ (cm & x_bound) ^ (cr & x_rmost);
  end

endmodule
