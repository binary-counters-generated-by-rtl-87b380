// sn_pkg -- comparator schedule shared by the 8-way and 7-way bit sorting
// networks.
//
// The 8-way network is Batcher's odd-even merge sort: 19 two-input sorters
// in six layers, which matches the six gate layers of the 8-way sorter used
// by the (15,4) counter. The exact comparator placement is this design's
// choice (a standard depth-6 network). Lines are numbered 0 (top, largest
// value after sorting) to 7 (bottom). Each layer holds up to four pairs;
// a pair is {valid, upper line, lower line}.
package sn_pkg;

  localparam int unsigned SN8_LINES  = 8;
  localparam int unsigned SN8_LAYERS = 6;
  localparam int unsigned SN8_WIDTH  = 4;   // most comparators in one layer

  typedef struct packed {
    logic       valid;
    logic [2:0] up;    // line that receives the OR (larger bit)
    logic [2:0] dn;    // line that receives the AND (smaller bit)
  } cmp_t;

  localparam cmp_t NONE = '{valid: 1'b0, up: 3'd0, dn: 3'd0};

  localparam cmp_t [SN8_LAYERS-1:0][SN8_WIDTH-1:0] SN8_SCHED = '{
    // layer 5: final odd-even merge cleanup
    '{NONE,              '{1'b1, 3'd5, 3'd6}, '{1'b1, 3'd3, 3'd4}, '{1'b1, 3'd1, 3'd2}},
    // layer 4
    '{NONE,              NONE,                '{1'b1, 3'd3, 3'd5}, '{1'b1, 3'd2, 3'd4}},
    // layer 3: merge the two sorted halves
    '{'{1'b1, 3'd3, 3'd7}, '{1'b1, 3'd2, 3'd6}, '{1'b1, 3'd1, 3'd5}, '{1'b1, 3'd0, 3'd4}},
    // layer 2
    '{NONE,              NONE,                '{1'b1, 3'd5, 3'd6}, '{1'b1, 3'd1, 3'd2}},
    // layer 1: merge pairs into sorted quads
    '{'{1'b1, 3'd5, 3'd7}, '{1'b1, 3'd4, 3'd6}, '{1'b1, 3'd1, 3'd3}, '{1'b1, 3'd0, 3'd2}},
    // layer 0: sort pairs
    '{'{1'b1, 3'd6, 3'd7}, '{1'b1, 3'd4, 3'd5}, '{1'b1, 3'd2, 3'd3}, '{1'b1, 3'd0, 3'd1}}
  };

  // Index of the comparator in `layer` whose upper line is `line`, or -1.
  // Lines at or above `lines` are treated as absent: a comparator that
  // touches an absent line is dropped, which is how the 7-way network is
  // derived from the 8-way one.
  function automatic int sched_up(int layer, int line, int lines);
    for (int c = 0; c < SN8_WIDTH; c++) begin
      if (SN8_SCHED[layer][c].valid && int'(SN8_SCHED[layer][c].up) == line
          && int'(SN8_SCHED[layer][c].dn) < lines)
        return c;
    end
    return -1;
  endfunction

  // 1 if `line` takes part in a (kept) comparator of `layer`.
  function automatic bit sched_used(int layer, int line, int lines);
    for (int c = 0; c < SN8_WIDTH; c++) begin
      if (SN8_SCHED[layer][c].valid && int'(SN8_SCHED[layer][c].up) < lines
          && int'(SN8_SCHED[layer][c].dn) < lines
          && (int'(SN8_SCHED[layer][c].up) == line || int'(SN8_SCHED[layer][c].dn) == line))
        return 1'b1;
    end
    return 1'b0;
  endfunction

endpackage
