// Self-checking testbench for spec_hc_prefix.
//
// Two instances: the default speculative network (N = 16, K = 8) and an
// unpruned one (K = N), which must be an exact adder. The expected carry of
// bit i in the speculative network is the carry out of adding only the
// operand bits inside its window: bits i..i-K+1 for odd i, bits i..i-K for
// even i (clipped at bit 0). The expected exact carries come from integer
// addition. Operands are random, plus words with long propagate runs so that
// the speculative carries really differ from the exact ones.
module tb_spec_hc_prefix;
  localparam int N = 16;
  localparam int K = 8;
  logic [N-1:0] a, b, g, p, c_spec, c_full;
  int checks = 0, failures = 0, wrong_spec = 0;

  assign g = a & b;
  assign p = a ^ b;

  spec_hc_prefix #(.N(N), .K(K)) dut (.g(g), .p(p), .c(c_spec));
  spec_hc_prefix #(.N(N), .K(N)) dut_full (.g(g), .p(p), .c(c_full));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry out of bit i when only bits i..lo are added, ripple style.
  function automatic logic window_carry(logic [N-1:0] x, logic [N-1:0] y, int i, int lo);
    int c;
    c = 0;
    for (int k = lo; k <= i; k++) c = (int'(x[k]) + int'(y[k]) + c) / 2;
    return c[0];
  endfunction

  task automatic check();
    #1;
    for (int i = 0; i < N; i++) begin
      int lo;
      logic exp_spec, exp_full;
      if (i % 2 == 1) lo = i - K + 1;
      else lo = (i == 0) ? 0 : i - K;
      if (lo < 0) lo = 0;
      exp_spec = window_carry(a, b, i, lo);
      exp_full = window_carry(a, b, i, 0);
      if (exp_spec != exp_full) wrong_spec++;
      checks += 2;
      if (c_spec[i] !== exp_spec) begin
        failures++;
        $display("FAIL spec a=%h b=%h bit %0d c=%b exp=%b", a, b, i, c_spec[i], exp_spec);
      end
      if (c_full[i] !== exp_full) begin
        failures++;
        $display("FAIL full a=%h b=%h bit %0d c=%b exp=%b", a, b, i, c_full[i], exp_full);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      a = N'($urandom); b = N'($urandom);
      if (t % 3 == 0) begin
        // Long propagate run above a generate at a random position.
        int j, len;
        j = $urandom_range(0, N - 1);
        len = $urandom_range(1, N);
        for (int k = j + 1; k <= j + len && k < N; k++) b[k] = ~a[k];
        a[j] = 1'b1; b[j] = 1'b1;
      end
      check();
    end
    $display("speculative carries that differ from exact ones: %0d", wrong_spec);
    checks++;
    if (wrong_spec == 0) begin
      failures++;
      $display("FAIL the stimulus never exercised a pruned carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
