// Self-checking testbench for err_detect (N = 16, K = 8, and K = 4).
//
// Expected err: the testbench measures the longest carry chain of the
// operands (a generating bit followed by propagating bits) and expects err
// exactly when it reaches K bits above the generating bit. It also checks
// the property the adder relies on: when err is low, the sum built from
// K-bit carry windows equals the true sum.
module tb_err_detect;
  localparam int N = 16;
  logic [N-1:0] a, b, g, p;
  logic err8, err4;
  int checks = 0, failures = 0, n_err = 0, n_ok = 0;

  assign g = a & b;
  assign p = a ^ b;

  err_detect #(.N(N), .K(8)) dut8 (.g(g), .p(p), .err(err8));
  err_detect #(.N(N), .K(4)) dut4 (.g(g), .p(p), .err(err4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Length of the longest run of propagating bits directly above a
  // generating bit.
  function automatic int longest_chain(logic [N-1:0] x, logic [N-1:0] y);
    int best;
    best = -1;
    for (int j = 0; j < N; j++) begin
      if (x[j] && y[j]) begin
        int len;
        len = 0;
        while (j + len + 1 < N && (x[j+len+1] != y[j+len+1])) len++;
        if (len > best) best = len;
      end
    end
    return best;
  endfunction

  // Sum where each carry sees only the K bits below it.
  function automatic logic [N-1:0] window_sum(logic [N-1:0] x, logic [N-1:0] y, int k);
    logic [N-1:0] s;
    for (int i = 0; i < N; i++) begin
      int c;
      c = 0;
      for (int m = (i - k > 0 ? i - k : 0); m < i; m++) c = (int'(x[m]) + int'(y[m]) + c) / 2;
      s[i] = x[i] ^ y[i] ^ c[0];
    end
    return s;
  endfunction

  task automatic check();
    int len;
    #1;
    len = longest_chain(a, b);
    checks += 2;
    if (err8 !== (len >= 8)) begin
      failures++;
      $display("FAIL K=8 a=%h b=%h chain=%0d err=%b", a, b, len, err8);
    end
    if (err4 !== (len >= 4)) begin
      failures++;
      $display("FAIL K=4 a=%h b=%h chain=%0d err=%b", a, b, len, err4);
    end
    if (err8) n_err++;
    else begin
      n_ok++;
      checks++;
      if (window_sum(a, b, 8) !== N'(a + b)) begin
        failures++;
        $display("FAIL K=8 err low but window sum wrong a=%h b=%h", a, b);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      a = N'($urandom); b = N'($urandom);
      if (t % 2 == 0) begin
        int j, len;
        j = $urandom_range(0, N - 1);
        len = $urandom_range(0, N);
        for (int k = j + 1; k <= j + len && k < N; k++) b[k] = ~a[k];
        a[j] = 1'b1; b[j] = 1'b1;
      end
      check();
    end
    $display("err high %0d times, low %0d times", n_err, n_ok);
    checks++;
    if (n_err == 0 || n_ok == 0) begin
      failures++;
      $display("FAIL err never toggled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
