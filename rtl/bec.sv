// Binary to excess-1 converter (BEC).
//
// Adds one to a W-bit value without a full adder chain:
//   x_0 = ~b_0,   x_i = b_i ^ (b_0 & b_1 & ... & b_(i-1)).
// In the modified square-root carry-select adder it turns the cin = 0 group
// result into the cin = 1 result, replacing the second ripple-carry adder.
// The result wraps modulo 2^W. Purely combinational.
module bec #(
  parameter int W = 4
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);

  always_comb begin
    logic ones_below;  // AND of all less significant input bits
    ones_below = 1'b1;
    for (int i = 0; i < W; i++) begin
      x[i]       = b[i] ^ ones_below;
      ones_below = ones_below & b[i];
    end
  end

endmodule
