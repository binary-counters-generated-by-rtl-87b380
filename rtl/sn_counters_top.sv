// sn_counters_top -- the two sorting-network counters side by side.
//
// A (7,3) counter and a (15,4) counter, each with its own inputs and
// outputs; they share no logic. Both are saturated counters: their outputs
// give the exact number of 1s among their inputs, which is what a partial
// product reduction tree (e.g. in a multiplier) needs from a column
// compressor. Purely combinational; no clock or reset.
module sn_counters_top (
  input  logic [6:0]  x7,      // inputs of the (7,3) counter
  output logic [2:0]  cnt7,    // {C2, C1, S}
  input  logic [14:0] x15,     // inputs of the (15,4) counter
  output logic [3:0]  cnt15    // {C3, C2, C1, S}
);
  counter_7_3  u_c73  (.x(x7),  .cnt(cnt7));
  counter_15_4 u_c154 (.x(x15), .cnt(cnt15));
endmodule
