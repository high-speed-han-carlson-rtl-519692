// Pre-processing stage of a prefix adder.
//
// For every bit position it forms the bit generate g_i = a_i & b_i and the bit
// propagate p_i = a_i ^ b_i, exactly as the prefix-adder formulation defines
// them. The propagate is the XOR form, so g_i and p_i are never both 1; the
// error detector relies on that. Purely combinational, N bits wide.
module gp_preproc #(
  parameter int N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p
);

  always_comb begin
    g = a & b;
    p = a ^ b;
  end

endmodule
