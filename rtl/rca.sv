// Ripple-carry adder of W full-adder cells.
//
// Each cell computes s_i = a_i ^ b_i ^ c_(i-1) and
// c_i = a_i b_i + a_i c_(i-1) + b_i c_(i-1), with c_(-1) = cin.
// The delay grows linearly with W. Purely combinational.
module rca #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  always_comb begin
    logic c;  // carry into the current bit
    c = cin;
    for (int i = 0; i < W; i++) begin
      s[i] = a[i] ^ b[i] ^ c;
      c    = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
    end
    cout = c;
  end

endmodule
