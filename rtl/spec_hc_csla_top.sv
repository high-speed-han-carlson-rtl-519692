// Variable-latency speculative Han-Carlson adder with a modified square-root
// carry-select adder as its error-correction path.
//
// A speculative Han-Carlson network (spec_hc_prefix) with its last
// Kogge-Stone rows pruned gives a sum that is right unless a carry chain of
// K or more bits occurs. The error detector (err_detect) spots such chains
// from the bit generate/propagate signals. When it is quiet the speculative
// sum is taken after one clock cycle. When it fires, that sum is discarded
// and the adder spends a second cycle delivering the exact sum of the
// modified square-root carry-select adder (sqrt_csla), so the average time
// per addition is Tclk * (1 + Perr).
//
// Datapath: operand registers -> gp_preproc -> spec_hc_prefix ->
// sum_postproc, with err_detect and sqrt_csla in parallel -> result
// registers.
//
// Interface and timing (valid/ready, this design's choice):
//   - a, b are taken into the operand registers on a rising edge with
//     in_valid & in_ready.
//   - Normal case: on the next edge the speculative result is registered;
//     out_valid is high for one cycle. A new operand pair may be taken on that
//     same edge, so error-free additions run at one per cycle.
//   - Misprediction: during the first cycle err is high, in_ready drops and
//     nothing is registered at the output; on the following edge the exact
//     result is registered with out_valid and corrected high.
//   So a result appears 1 cycle (no error) or 2 cycles (error) after the edge
//   that registered its operands. rst_n is an asynchronous active-low reset.
// The adder has no carry input; cout is the carry out of bit N-1.
// The assertions at the end are disabled while rst_n is low; a linter may
// note that rst_n is then used both as an asynchronous reset and in a clocked
// expression, which is intended.
module spec_hc_csla_top #(
  parameter int N = 16,  // word width, a power of two
  parameter int K = 8    // speculation window, a power of two, 2 <= K <= N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         corrected
);

  // Operand registers and state.
  logic [N-1:0] a_q, b_q;
  logic         busy_q;  // operand registers hold an unfinished addition
  logic         fix_q;   // second (correction) cycle of a mispredicted addition

  // Speculative path.
  logic [N-1:0] g, p, c_spec, s_spec;
  logic         err;

  // Exact path.
  logic [N-1:0] s_exact;
  logic         cout_exact;

  gp_preproc #(.N(N)) u_pre (.a(a_q), .b(b_q), .g(g), .p(p));

  spec_hc_prefix #(.N(N), .K(K)) u_prefix (.g(g), .p(p), .c(c_spec));

  sum_postproc #(.N(N)) u_post (.p(p), .c(c_spec), .s(s_spec));

  err_detect #(.N(N), .K(K)) u_err (.g(g), .p(p), .err(err));

  sqrt_csla #(.N(N)) u_fix (
    .a(a_q), .b(b_q), .cin(1'b0), .s(s_exact), .cout(cout_exact)
  );

  // The operand slot is freed by every cycle except the first cycle of a
  // mispredicted addition.
  logic done;
  assign done     = busy_q & (fix_q | ~err);
  assign in_ready = ~busy_q | done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= '0;
      b_q       <= '0;
      busy_q    <= 1'b0;
      fix_q     <= 1'b0;
      out_valid <= 1'b0;
      sum       <= '0;
      cout      <= 1'b0;
      corrected <= 1'b0;
    end else begin
      out_valid <= done;
      if (done) begin
        sum       <= fix_q ? s_exact : s_spec;
        cout      <= fix_q ? cout_exact : c_spec[N-1];
        corrected <= fix_q;
      end
      fix_q <= busy_q & ~fix_q & err;
      if (in_valid && in_ready) begin
        a_q    <= a;
        b_q    <= b;
        busy_q <= 1'b1;
      end else if (done) begin
        busy_q <= 1'b0;
      end
    end
  end

  // A correction cycle always follows a flagged first cycle and always ends
  // the addition.
  a_fix_done : assert property (@(posedge clk) disable iff (!rst_n) fix_q |-> done);
  // Operands are never replaced while an addition is still in progress.
  a_no_overwrite : assert property (@(posedge clk) disable iff (!rst_n)
                                    (busy_q && !done) |-> !in_ready);

endmodule
