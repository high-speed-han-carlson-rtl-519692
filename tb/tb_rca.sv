// Self-checking testbench for rca: exhaustive at 4 bits, random at 8 bits,
// compared with integer addition.
module tb_rca;
  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic       cin, co4, co8;
  int checks = 0, failures = 0;

  rca #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin), .s(s4), .cout(co4));
  rca #(.W(8)) dut8 (.a(a8), .b(b8), .cin(cin), .s(s8), .cout(co8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      a4 = v[3:0]; b4 = v[7:4]; cin = v[8];
      a8 = 8'($urandom); b8 = 8'($urandom);
      #1;
      checks += 2;
      if (int'({co4, s4}) != int'(a4) + int'(b4) + int'(cin)) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d -> %0d", a4, b4, cin, {co4, s4});
      end
      if (int'({co8, s8}) != int'(a8) + int'(b8) + int'(cin)) begin
        failures++;
        $display("FAIL W=8 %0d+%0d+%0d -> %0d", a8, b8, cin, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
