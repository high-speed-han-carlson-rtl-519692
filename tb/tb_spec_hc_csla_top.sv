// End-to-end testbench of spec_hc_csla_top at its default size (16 bits,
// K = 8).
//
// A random stream of additions is offered with a random in_valid pattern.
// Operands are a mix of uniform random words and words built with a long
// carry chain, so both the one-cycle speculative path and the two-cycle
// correction path are taken often. Every accepted pair is queued with its
// acceptance cycle; every result is checked against integer addition, and
// its latency against the expected one: 1 cycle when the operands hold no
// carry chain of K or more bits, 2 cycles otherwise (the corrected flag must
// agree). It counts how often each mechanism happened (speculative result,
// corrected result, back-to-back acceptance, input stall, idle input) and
// fails if any never did.
module tb_spec_hc_csla_top;
  localparam int N = 16;
  localparam int K = 8;      // must match the top's default
  localparam int NUM = 20000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, in_ready, out_valid, cout, corrected;
  logic [N-1:0] a, b, sum;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_spec = 0, n_fix = 0, n_stall = 0, n_b2b = 0, n_idle = 0, n_done = 0;

  typedef struct {
    logic [N:0] exp;
    bit         long_chain;
    int         t_in;
  } item_t;
  item_t q[$];

  spec_hc_csla_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .out_valid(out_valid), .sum(sum), .cout(cout),
    .corrected(corrected)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NUM * 4 + 100) @(posedge clk);
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

  task automatic new_operands();
    a = N'($urandom); b = N'($urandom);
    if ($urandom_range(0, 2) == 0) begin
      int j, len;
      j = $urandom_range(0, N - 1);
      len = $urandom_range(0, N);
      for (int k = j + 1; k <= j + len && k < N; k++) b[k] = ~a[k];
      a[j] = 1'b1; b[j] = 1'b1;
    end
  endtask

  int  sent = 0;
  bit  last_accept = 1'b0;

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (out_valid !== 1'b0 || in_ready !== 1'b1) begin
      failures++;
      $display("FAIL state after reset");
    end
    new_operands();
    in_valid = 1'b1;
    while (n_done < NUM) begin
      @(posedge clk);
      cycle++;
      // Sample the handshake as it was just before this edge.
      if (in_valid && in_ready) begin
        item_t it;
        it.exp = (N + 1)'(a) + (N + 1)'(b);
        it.long_chain = has_long_chain(a, b);
        it.t_in = cycle;
        q.push_back(it);
        sent++;
        if (last_accept) n_b2b++;
        last_accept = 1'b1;
      end else begin
        last_accept = 1'b0;
        if (in_valid) n_stall++;
        else n_idle++;
      end
      #1;
      if (out_valid) begin
        item_t it;
        int lat;
        n_done++;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL result without an operand pair");
        end else begin
          it = q.pop_front();
          lat = cycle - it.t_in;
          if ({cout, sum} !== it.exp || corrected !== it.long_chain ||
              lat != (it.long_chain ? 2 : 1)) begin
            failures++;
            $display("FAIL got %h corrected=%b latency=%0d, expected %h chain=%b",
                     {cout, sum}, corrected, lat, it.exp, it.long_chain);
          end
          if (corrected) n_fix++;
          else n_spec++;
        end
      end
      // Next input (changes only after the edge, as a registered source would).
      if (in_valid && in_ready || !in_valid) begin
        if (sent < NUM && $urandom_range(0, 4) != 0) begin
          in_valid = 1'b1;
          new_operands();
        end else begin
          in_valid = 1'b0;
        end
      end
    end
    $display("results %0d: speculative %0d, corrected %0d; back-to-back %0d, stalls %0d, idle %0d",
             n_done, n_spec, n_fix, n_b2b, n_stall, n_idle);
    checks += 4;
    if (n_spec == 0) begin failures++; $display("FAIL no speculative result"); end
    if (n_fix == 0) begin failures++; $display("FAIL no corrected result"); end
    if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back acceptance"); end
    if (n_stall == 0) begin failures++; $display("FAIL no input stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
