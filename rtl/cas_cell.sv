`timescale 1ps/1fs
// cas_cell: controlled add/subtract cell of the array divider.
//
// The divisor bit d_i is inverted when the row control t_i is 1 (subtract)
// and added to the partial-remainder bit ri_i with carry ci_i in a full
// adder; ro_o is the new remainder bit and co_o the carry to the next more
// significant cell.  This is the published cell: an XOR of T and D feeding
// one input of a full adder.  Combinational.
module cas_cell (
  input  logic t_i,
  input  logic ri_i,
  input  logic d_i,
  input  logic ci_i,
  output logic ro_o,
  output logic co_o
);
  logic dx;
  assign dx   = d_i ^ t_i;
  assign ro_o = ri_i ^ dx ^ ci_i;
  assign co_o = (ri_i & dx) | (ri_i & ci_i) | (dx & ci_i);
endmodule
