// Post-processing stage of a prefix adder.
//
// s_i = p_i ^ c_(i-1), where c_i is the carry out of bit i produced by the
// prefix network and c_(-1) = 0 (the adder has no carry input, as in the
// prefix formulation it follows). Purely combinational, N bits wide.
// c[N-1], the carry out of the word, is not needed for the sum; the port
// keeps the full carry vector so that it matches the prefix network's output.
module sum_postproc #(
  parameter int N = 16
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] c,
  output logic [N-1:0] s
);

  always_comb s = p ^ {c[N-2:0], 1'b0};

endmodule
