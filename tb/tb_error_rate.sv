// Error-rate workload for spec_hc_csla_top at its default size (16 bits,
// K = 8): a Monte Carlo run of uniformly random operand pairs, offered back
// to back.
//
// It measures the misprediction probability Perr (share of results that took
// the correction path) and the average number of cycles per addition, and
// checks that (a) every sum is right, (b) the number of corrections equals
// the number of operand pairs that hold a carry chain of K or more bits, as
// counted by the testbench, (c) the total cycle count is exactly
// n * (1 + Perr), i.e. Tavg = Tclk * (1 + Perr), and (d) the measured Perr
// is within 1% of the exact probability of such a chain.
//
// The exact probability comes from a recursion over the bit positions: each
// bit generates (probability 1/4), propagates (1/2) or kills (1/4); the state
// is the length of the propagate run above the latest generate, and reaching
// K ends in the error state. The sample size, 12 million, gives a relative
// error below 1% at 99% confidence for Perr near 0.78% (2.576 standard
// deviations of sqrt((1 - Perr) / (n Perr)) is about 0.85%).
module tb_error_rate;
  localparam int N = 16;
  localparam int K = 8;
  localparam int NUM = 12_000_000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, in_ready, out_valid, cout, corrected;
  logic [N-1:0] a, b, sum;

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_fix = 0, n_long = 0;
  longint cycles = 0;
  logic [N:0] exp_q[$];

  spec_hc_csla_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .out_valid(out_valid), .sum(sum), .cout(cout),
    .corrected(corrected)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NUM * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit has_long_chain(logic [N-1:0] x, logic [N-1:0] y);
    for (int j = 0; j + K < N; j++) begin
      if (x[j] && y[j]) begin
        int len;
        len = 0;
        while (j + len + 1 < N && (x[j+len+1] != y[j+len+1])) len++;
        if (len >= K) return 1'b1;
      end
    end
    return 1'b0;
  endfunction

  // Exact probability that uniform random N-bit operands hold a carry chain
  // of K or more bits above a generating bit.
  function automatic real exact_perr();
    real st[K+1];  // st[0..K-1]: run length after latest generate; st[K]: none
    real nx[K+1];
    real err;
    err = 0.0;
    foreach (st[i]) st[i] = 0.0;
    st[K] = 1.0;
    for (int bitpos = 0; bitpos < N; bitpos++) begin
      real active;
      foreach (nx[i]) nx[i] = 0.0;
      active = 0.0;
      for (int i = 0; i < K; i++) active += st[i];
      nx[0] = 0.25 * (active + st[K]);      // generate starts a chain
      nx[K] = 0.25 * (active + st[K]) + 0.5 * st[K];  // kill, or propagate with no chain
      for (int i = 0; i < K; i++) begin     // propagate extends a chain
        if (i + 1 >= K) err += 0.5 * st[i];
        else nx[i+1] += 0.5 * st[i];
      end
      st = nx;
    end
    return err;
  endfunction

  initial begin
    real perr, tavg, pexact;
    rst_n = 1'b0;
    in_valid = 1'b0;
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    a = N'($urandom); b = N'($urandom);
    in_valid = 1'b1;
    while (n_out < NUM) begin
      @(posedge clk);
      if (n_in < NUM) cycles++;
      if (in_valid && in_ready) begin
        exp_q.push_back((N + 1)'(a) + (N + 1)'(b));
        if (has_long_chain(a, b)) n_long++;
        n_in++;
      end
      #1;
      if (out_valid) begin
        logic [N:0] e;
        n_out++;
        e = exp_q.pop_front();
        checks++;
        if ({cout, sum} !== e) begin
          failures++;
          $display("FAIL got %h expected %h", {cout, sum}, e);
        end
        if (corrected) n_fix++;
      end
      if (in_valid && in_ready) begin
        if (n_in < NUM) begin
          a = N'($urandom); b = N'($urandom);
        end else in_valid = 1'b0;
      end
    end
    perr = real'(n_fix) / real'(NUM);
    tavg = real'(cycles) / real'(NUM);
    $display("additions %0d, corrected %0d, Perr = %f, cycles %0d, Tavg/Tclk = %f",
             NUM, n_fix, perr, cycles, tavg);
    pexact = exact_perr();
    $display("exact Perr = %f, relative deviation of the estimate = %f",
             pexact, (perr - pexact) / pexact);
    checks += 3;
    if ((perr - pexact) / pexact > 0.01 || (pexact - perr) / pexact > 0.01) begin
      failures++;
      $display("FAIL measured Perr outside 1%% of the exact value");
    end
    if (n_fix != n_long) begin
      failures++;
      $display("FAIL corrections %0d, long chains %0d", n_fix, n_long);
    end
    // The last addition may still be in its correction cycle when the input
    // closes, so allow one cycle of slack.
    if (cycles < (longint'(NUM) + longint'(n_fix)) - 1 || cycles > (longint'(NUM) + longint'(n_fix))) begin
      failures++;
      $display("FAIL cycles %0d, expected %0d", cycles, NUM + n_fix);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
