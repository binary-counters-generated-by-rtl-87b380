// onehot_code -- one-hot code of a sorted bit sequence.
//
// A descending-sorted sequence s (s[0] on top) is a thermometer code: its
// 1s form an unbroken run from the top. The position where the run ends is
// the number of 1s, so a single AND per output finds it:
//   p[0] = ~s[0],  p[k] = s[k-1] & ~s[k] (0 < k < N),  p[N] = s[N-1].
// Exactly one p[k] is 1 and k is the count of 1s: these are the Pk / Qk
// codes of the document. p[0] is an inverter and p[N] a plain wire to the
// bottom line, so synthesis reports p[N] as fed straight from an input;
// that is intended. Purely combinational, one gate level. The input
// must be sorted; for any other input the output is not one-hot.
module onehot_code #(
  parameter int unsigned N = 4   // length of the sorted sequence
) (
  input  logic [N-1:0] s,   // sorted sequence, s[0] = top
  output logic [N:0]   p    // one-hot count: p[k] = 1 <=> k ones
);
  always_comb begin
    p[0] = ~s[0];
    for (int k = 1; k < N; k++) p[k] = s[k-1] & ~s[k];
    p[N] = s[N-1];
  end
endmodule
