// Speculative Han-Carlson prefix network.
//
// A Han-Carlson network is a Kogge-Stone tree on the odd bit positions,
// wrapped in one Brent-Kung row at each end:
//   row 1         : every odd bit i combines with bit i-1 (span 1),
//   rows 2..log2N : odd bits combine with odd bit i-d, d = 2, 4, ..., N/2,
//   last row      : every even bit i >= 2 combines with odd bit i-1.
// That is 1 + log2(N) rows of black cells. The speculative version prunes
// the last Kogge-Stone rows: only rows with span d <= K/2 are kept, so the
// group generate of an odd bit covers at most K bits (bits i down to i-K+1)
// and that of an even bit at most K+1 bits. The carries are then exact
// unless a carry chain of at least K bits occurs, which err_detect flags.
// With K = N nothing is pruned and the network is an exact Han-Carlson adder.
//
// The row structure follows the Han-Carlson topology and the pruning of its
// last Kogge-Stone row for K = 8 at N = 16; generalising it to other powers
// of two is this design's choice. There is no carry input, so c[i] is the
// group generate of the window ending at bit i. Purely combinational.
//
// Ports: g, p   bit generate and propagate (from gp_preproc),
//        c[i]   speculative carry out of bit i (c[0] is simply g[0]).
module spec_hc_prefix
  import hc_pkg::*;
#(
  parameter int N = 16,  // word width, a power of two
  parameter int K = 8    // speculation window, a power of two, 2 <= K <= N
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] c
);

  localparam int LOGN = $clog2(N);
  localparam int ROWS = LOGN + 1;  // rows of cells, numbered 1..ROWS

  // g_row[r].v holds the (G, P) pairs after row r; the input pairs are row 0.
  for (genvar r = 0; r <= ROWS; r++) begin : g_row
    gp_t v [N];
    if (r == 0) begin : g_input
      for (genvar i = 0; i < N; i++) begin : g_bit
        assign v[i] = '{g: g[i], p: p[i]};
      end
    end else begin : g_cells
      // Span of the row and the bits that get a black cell.
      localparam int D = (r == 1 || r == ROWS) ? 1 : (1 << (r - 1));
      for (genvar i = 0; i < N; i++) begin : g_bit
        localparam bit ODD   = (i % 2 == 1);
        localparam bit BLACK =
            (r == 1)    ? ODD :                           // first Brent-Kung row
            (r == ROWS) ? (!ODD && i >= 2) :              // last Brent-Kung row
                          (ODD && i >= D && 2 * D <= K);  // kept Kogge-Stone rows
        if (BLACK) begin : g_black
          prefix_cell u_cell (.hi(g_row[r-1].v[i]), .lo(g_row[r-1].v[i-D]), .out(v[i]));
        end else begin : g_white
          assign v[i] = g_row[r-1].v[i];
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign c[i] = g_row[ROWS].v[i].g;
  end

endmodule
