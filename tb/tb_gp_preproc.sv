// Self-checking testbench for gp_preproc: random and corner operands; the
// expected generate/propagate bits are taken from the two-bit sum a_i + b_i.
module tb_gp_preproc;
  localparam int N = 16;
  logic [N-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  gp_preproc #(.N(N)) dut (.a(a), .b(b), .g(g), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    for (int i = 0; i < N; i++) begin
      int bit_sum;
      bit_sum = int'(a[i]) + int'(b[i]);
      checks++;
      if (g[i] !== (bit_sum == 2) || p[i] !== (bit_sum == 1)) begin
        failures++;
        $display("FAIL a=%h b=%h bit %0d g=%b p=%b", a, b, i, g[i], p[i]);
      end
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = '1; b = '0; check();
    a = 16'haaaa; b = 16'h5555; check();
    for (int t = 0; t < 500; t++) begin
      a = N'($urandom); b = N'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
