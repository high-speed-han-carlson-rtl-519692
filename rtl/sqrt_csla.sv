// Modified square-root carry-select adder (SQRT CSLA) with binary to
// excess-1 converters.
//
// The word is cut into groups of growing width (2, 2, 3, 4, 5, ... bits; the
// last group is cut at N, giving 2-2-3-4-5 for N = 16). The first group is a
// ripple-carry adder fed by cin. Every other group of width w has one
// ripple-carry adder with carry in 0, giving a (w+1)-bit result {cout, sum},
// and a (w+1)-bit binary to excess-1 converter that turns it into the
// carry-in-1 result. The carry out of the group below selects between the
// two, so the select signals ripple only once per group while the groups
// compute in parallel. Compared with the classic carry-select adder the BEC
// replaces the second, carry-in-1 ripple adder. The group sizes are this
// design's choice. Purely combinational.
module sqrt_csla
  import hc_pkg::*;
#(
  parameter int N = 16  // word width, at least 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int NG = csla_num_groups(N);

  logic [NG:0] gc;  // gc[j] is the carry into group j

  assign gc[0] = cin;

  for (genvar j = 0; j < NG; j++) begin : g_grp
    localparam int LO = csla_grp_lo(j);
    localparam int W  = csla_grp_width(j, N);

    if (j == 0) begin : g_first
      rca #(.W(W)) u_rca (
        .a(a[LO +: W]), .b(b[LO +: W]), .cin(gc[0]),
        .s(s[LO +: W]), .cout(gc[1])
      );
    end else begin : g_sel
      logic [W:0] r0;  // {cout, sum} with carry in 0
      logic [W:0] r1;  // {cout, sum} with carry in 1

      rca #(.W(W)) u_rca (
        .a(a[LO +: W]), .b(b[LO +: W]), .cin(1'b0),
        .s(r0[W-1:0]), .cout(r0[W])
      );
      bec #(.W(W + 1)) u_bec (.b(r0), .x(r1));

      always_comb {gc[j+1], s[LO +: W]} = gc[j] ? r1 : r0;
    end
  end

  assign cout = gc[NG];

endmodule
