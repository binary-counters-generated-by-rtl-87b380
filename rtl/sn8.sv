// sn8 -- 8-way bit sorting network (descending).
//
// Sorts eight bits so that all 1s come out on the top lines: s[k-1] = Hk is
// 1 exactly when at least k inputs are 1, a thermometer code of the count.
// Built from 19 two-input sorters (OR/AND pairs) in six layers, Batcher's
// odd-even merge sort; the schedule lives in sn_pkg. Six layers of basic
// gates follows the document; the particular network is this design's
// choice. Purely combinational, six gate levels from x to s.
module sn8
  import sn_pkg::*;
(
  input  logic [8-1:0] x,   // unsorted input bits
  output logic [8-1:0] s    // sorted: s[0] top (largest) .. s[7] bottom
);
  localparam int LINES = SN8_LINES;

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
