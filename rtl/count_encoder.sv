// count_encoder -- output equations of a sorting-network counter.
//
// The counter's inputs are split into two groups of NH and NI bits, each
// sorted into a thermometer code (h = H1..HNH, i = I1..INI) and turned into
// one-hot codes (p = P0..PNH, q = Q0..QNI). The count is a + b where Pa and
// Qb are the two active one-hot bits, so every output bit is an OR of
// products Pa & Qb, one product per (a, b) pair whose sum has that bit set.
//
// The most significant bit (C2 of the (7,3) counter, C3 of the (15,4)
// counter) is 1 when the count reaches T = 2**(W-1). It is taken from the
// sorted sequences directly: count >= T exactly when Hm & Ik is 1 for some
// m + k = T (with H0 = I0 = 1), e.g. C2 = H4 | H3&I1 | H2&I2 | H1&I3. This
// is the same function as OR over Pa & Qb with a + b >= T, in fewer terms.
// The lower bits use the one-hot products. That the top bit is the
// "subscripts add up to at least T" condition follows the document; the
// exact product lists of the lower bits are this design's derivation.
//
// Purely combinational: one AND level and one OR level after the one-hot
// codes. The counter is saturated: NH + NI must lie in [2**(W-1), 2**W-1].
module count_encoder #(
  parameter int unsigned NH = 4,   // length of the first sorted group
  parameter int unsigned NI = 3,   // length of the second sorted group
  parameter int unsigned W  = 3    // number of output bits
) (
  input  logic [NH-1:0] h,     // first sorted group, h[0] = H1
  input  logic [NI-1:0] i,     // second sorted group, i[0] = I1
  input  logic [NH:0]   p,     // one-hot code of h, p[a] = Pa
  input  logic [NI:0]   q,     // one-hot code of i, q[b] = Qb
  output logic [W-1:0]  cnt    // number of 1s; cnt[0] = S
);
  localparam int unsigned T = 2 ** (W - 1);

  if (NH + NI > 2 ** W - 1 || NH + NI < T) begin : g_size_check
    $error("count_encoder: NH+NI=%0d does not fit a saturated %0d-bit counter", NH + NI, W);
  end

  // Thermometer bits with the constant H0 = I0 = 1 and 0 beyond the end.
  logic [NH+1:0] hx;   // hx[m] = (count of first group >= m)
  logic [NI+1:0] ix;
  assign hx = {1'b0, h, 1'b1};
  assign ix = {1'b0, i, 1'b1};

  always_comb begin
    cnt = '0;
    // Top bit from the sorted sequences.
    for (int m = 0; m <= int'(T); m++) begin
      if (m <= int'(NH) && int'(T) - m <= int'(NI))
        cnt[W-1] = cnt[W-1] | (hx[m] & ix[int'(T) - m]);
    end
    // Lower bits from the one-hot codes.
    for (int a = 0; a <= int'(NH); a++) begin
      for (int b = 0; b <= int'(NI); b++) begin
        for (int k = 0; k < int'(W) - 1; k++) begin
          if (((a + b) >> k) % 2 == 1) cnt[k] = cnt[k] | (p[a] & q[b]);
        end
      end
    end
  end
endmodule
