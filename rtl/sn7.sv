// sn7 -- 7-way bit sorting network (descending).
//
// Derived from the 8-way network by removing its bottom line: every
// comparator that touches line 7 is dropped (three of the 19), leaving 16
// two-input sorters, still in six layers. Removing a line is the same as
// feeding it a constant 0, which a descending sort leaves at the bottom, so
// the remaining seven lines still sort. s[k-1] = Ik is 1 exactly when at
// least k inputs are 1. The derivation from the 8-way network follows the
// document; which line is removed is this design's choice. Purely
// combinational, six gate levels.
module sn7
  import sn_pkg::*;
(
  input  logic [7-1:0] x,   // unsorted input bits
  output logic [7-1:0] s    // sorted: s[0] top (largest) .. s[6] bottom
);
  localparam int LINES = SN8_LINES - 1;   // bottom line of the 8-way network removed

  // w[l] holds the lines entering layer l; w[SN8_LAYERS] is the result.
  logic [LINES-1:0] w [SN8_LAYERS+1];

  assign w[0] = x;

  for (genvar l = 0; l < SN8_LAYERS; l++) begin : g_layer
    for (genvar j = 0; j < LINES; j++) begin : g_line
      localparam int C = sched_up(l, j, LINES);
      if (C >= 0) begin : g_cmp
        localparam int D = int'(SN8_SCHED[l][C].dn);
        sorter2 u_sort (
          .a (w[l][j]),
          .b (w[l][D]),
          .hi(w[l+1][j]),
          .lo(w[l+1][D])
        );
      end else if (!sched_used(l, j, LINES)) begin : g_wire
        assign w[l+1][j] = w[l][j];
      end
    end
  end

  assign s = w[SN8_LAYERS];
endmodule
