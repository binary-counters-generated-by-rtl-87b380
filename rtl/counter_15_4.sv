// counter_15_4 -- saturated (15,4) counter built from two sorting networks.
//
// cnt = {C3, C2, C1, S} is the number of 1s among the fifteen inputs,
// 0..15. x[7:0] go through the 8-way sorting network (H1..H8) and x[14:8]
// through the 7-way network derived from it (I1..I7). The one-hot codes
// P0..P8 and Q0..Q7 of the two sorted sequences name the two partial
// counts; count_encoder forms C3 (count >= 8) from the sorted sequences and
// C2, C1, S from the products Pa & Qb. The 8-way / 7-way split and the
// method follow the document; the assignment of input bits to the two
// networks is this design's choice.
//
// Purely combinational: six sorter layers, one one-hot layer, then the
// AND-OR output equations.
module counter_15_4 (
  input  logic [14:0] x,     // fifteen bits of equal weight
  output logic [3:0]  cnt    // {C3, C2, C1, S}: number of 1s in x
);
  logic [7:0] h;   // H1..H8
  logic [6:0] i;   // I1..I7
  logic [8:0] p;   // P0..P8
  logic [7:0] q;   // Q0..Q7

  sn8 u_sn8 (.x(x[7:0]),  .s(h));
  sn7 u_sn7 (.x(x[14:8]), .s(i));

  onehot_code #(.N(8)) u_oh_h (.s(h), .p(p));
  onehot_code #(.N(7)) u_oh_i (.s(i), .p(q));

  count_encoder #(.NH(8), .NI(7), .W(4)) u_enc (
    .h(h), .i(i), .p(p), .q(q), .cnt(cnt)
  );
endmodule
