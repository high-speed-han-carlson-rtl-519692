// Self-checking testbench for sum_postproc: random propagate and carry
// vectors; each expected sum bit is worked out bit by bit.
module tb_sum_postproc;
  localparam int N = 16;
  logic [N-1:0] p, c, s;
  int checks = 0, failures = 0;

  sum_postproc #(.N(N)) dut (.p(p), .c(c), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      p = N'($urandom); c = N'($urandom);
      if (t == 0) begin p = '0; c = '1; end
      #1;
      for (int i = 0; i < N; i++) begin
        logic cin_i;
        cin_i = (i == 0) ? 1'b0 : c[i-1];
        checks++;
        if (s[i] !== (p[i] != cin_i)) begin
          failures++;
          $display("FAIL p=%h c=%h bit %0d s=%b", p, c, i, s[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
