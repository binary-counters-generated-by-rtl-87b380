// sn4 -- 4-way bit sorting network (descending), the "4SN" of the (7,3)
// counter.
//
// Five two-input sorters in three layers: (0,1) and (2,3); then (0,2) and
// (1,3); then (1,2). Afterwards s[0] = H1 >= ... >= s[3] = H4, and Hk = 1
// exactly when at least k inputs are 1. Three sorter layers follows the
// document; the placement is the standard optimal 4-input network.
// Purely combinational.
module sn4 (
  input  logic [3:0] x,   // unsorted bits
  output logic [3:0] s    // sorted, s[0] = H1 (top)
);
  logic [3:0] l1, l2;

  // layer 1: sort the two pairs
  sorter2 u_c0 (.a(x[0]),  .b(x[1]),  .hi(l1[0]), .lo(l1[1]));
  sorter2 u_c1 (.a(x[2]),  .b(x[3]),  .hi(l1[2]), .lo(l1[3]));
  // layer 2: largest to the top, smallest to the bottom
  sorter2 u_c2 (.a(l1[0]), .b(l1[2]), .hi(l2[0]), .lo(l2[2]));
  sorter2 u_c3 (.a(l1[1]), .b(l1[3]), .hi(l2[1]), .lo(l2[3]));
  // layer 3: order the middle pair
  sorter2 u_c4 (.a(l2[1]), .b(l2[2]), .hi(s[1]),  .lo(s[2]));
  assign s[0] = l2[0];
  assign s[3] = l2[3];
endmodule
