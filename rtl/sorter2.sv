// sorter2 -- two-input bit sorter, the compare-exchange element of every
// sorting network in this design.
//
// For single bits the larger of two values is their OR and the smaller is
// their AND, so one layer of basic gates sorts a pair. Networks here sort in
// descending order: `hi` goes to the upper line (toward H1/I1), `lo` to the
// lower line. Purely combinational, one gate level.
module sorter2 (
  input  logic a,
  input  logic b,
  output logic hi,
  output logic lo
);
  always_comb begin
    hi = a | b;
    lo = a & b;
  end
endmodule
