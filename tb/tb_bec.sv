// Self-checking testbench for bec: every input of a 4-bit and a 6-bit
// converter, compared with b + 1 modulo 2^W.
module tb_bec;
  logic [3:0] b4, x4;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0;

  bec #(.W(4)) dut4 (.b(b4), .x(x4));
  bec #(.W(6)) dut6 (.b(b6), .x(x6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      b4 = 4'(v); b6 = 6'(v);
      #1;
      checks++;
      if (int'(x6) != (v + 1) % 64) begin
        failures++;
        $display("FAIL W=6 b=%0d x=%0d", v, x6);
      end
      if (v < 16) begin
        checks++;
        if (int'(x4) != (v + 1) % 16) begin
          failures++;
          $display("FAIL W=4 b=%0d x=%0d", v, x4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
