// counter_7_3 -- saturated (7,3) counter built from two sorting networks.
//
// cnt = {C2, C1, S} is the number of 1s among the seven inputs, 0..7.
// The inputs are split asymmetrically: x[3:0] go through the 4-way sorting
// network (giving H1..H4) and x[6:4] through the 3-way network (I1..I3).
// Sorting keeps the number of 1s in each group, so the one-hot codes of the
// two sorted sequences (P0..P4 and Q0..Q3) name the two partial counts, and
// count_encoder forms C2 from H/I and C1, S from the products Pa & Qb.
// The split into a 4-way and a 3-way network and the use of one-hot codes
// follow the document; which input bits go to which network is this
// design's choice (the count does not depend on it).
//
// Purely combinational: three sorter layers, one one-hot layer, then the
// AND-OR output equations.
module counter_7_3 (
  input  logic [6:0] x,     // seven bits of equal weight
  output logic [2:0] cnt    // {C2, C1, S}: number of 1s in x
);
  logic [3:0] h;   // H1..H4 in h[0]..h[3]
  logic [2:0] i;   // I1..I3 in i[0]..i[2]
  logic [4:0] p;   // P0..P4
  logic [3:0] q;   // Q0..Q3

  sn4 u_sn4 (.x(x[3:0]), .s(h));
  sn3 u_sn3 (.x(x[6:4]), .s(i));

  onehot_code #(.N(4)) u_oh_h (.s(h), .p(p));
  onehot_code #(.N(3)) u_oh_i (.s(i), .p(q));

  count_encoder #(.NH(4), .NI(3), .W(3)) u_enc (
    .h(h), .i(i), .p(p), .q(q), .cnt(cnt)
  );
endmodule
