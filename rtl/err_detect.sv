// Error detector of the speculative adder.
//
// Every carry of spec_hc_prefix looks back over a window of at least K bits,
// so a speculative carry can only be wrong when a carry born at some bit j
// (g_j = 1) propagates through the K bits above it (p_(j+1) .. p_(j+K) all
// 1). The detector ORs that condition over all j:
//   err = OR_j ( g_j & p_(j+1) & ... & p_(j+K) ),  0 <= j <= N-1-K.
// It never misses a wrong carry. It may raise a false alarm when the chain
// ends on an even bit, whose window is K+1 bits; the result is then merely
// delayed, never wrong. It is built only from the bit-level g and p, as
// AND-OR logic. The exact form of the condition is this design's choice.
// Purely combinational. With K >= N no chain can be too long and err is 0.
module err_detect #(
  parameter int N = 16,  // word width
  parameter int K = 8    // speculation window of the prefix network
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic         err
);

  always_comb begin
    err = 1'b0;
    for (int j = 0; j + K <= N - 1; j++) begin
      logic run;
      run = g[j];
      for (int k = 1; k <= K; k++) run &= p[j+k];
      err |= run;
    end
  end

endmodule
