// sn3 -- 3-way bit sorting network (descending), the "3SN" of the (7,3)
// counter.
//
// Three two-input sorters in three layers: lines (0,1), then (1,2), then
// (0,1) again. Afterwards s[0] = I1 >= s[1] = I2 >= s[2] = I3, and Ik = 1
// exactly when at least k of the inputs are 1. Three sorter layers follows
// the document; the comparator placement is the standard minimal 3-input
// network. Purely combinational.
module sn3 (
  input  logic [2:0] x,   // unsorted bits
  output logic [2:0] s    // sorted, s[0] = I1 (top)
);
  logic [2:0] l1, l2;

  sorter2 u_c0 (.a(x[0]),  .b(x[1]),  .hi(l1[0]), .lo(l1[1]));
  assign l1[2] = x[2];

  sorter2 u_c1 (.a(l1[1]), .b(l1[2]), .hi(l2[1]), .lo(l2[2]));
  assign l2[0] = l1[0];

  sorter2 u_c2 (.a(l2[0]), .b(l2[1]), .hi(s[0]),  .lo(s[1]));
  assign s[2] = l2[2];
endmodule
