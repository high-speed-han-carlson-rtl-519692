// Self-checking testbench for sqrt_csla: the default 16-bit adder and a
// 32-bit one, fed with random operands, with operands that make the carry
// cross every group boundary, and with both carry-in values; compared with
// integer addition.
module tb_sqrt_csla;
  logic [15:0] a, b, s;
  logic [31:0] a32, b32, s32;
  logic        cin, cout, cout32;
  int checks = 0, failures = 0;

  sqrt_csla dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  sqrt_csla #(.N(32)) dut32 (.a(a32), .b(b32), .cin(cin), .s(s32), .cout(cout32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint exp16, exp32;
    #1;
    exp16 = longint'(a) + longint'(b) + longint'(cin);
    exp32 = longint'(a32) + longint'(b32) + longint'(cin);
    checks += 2;
    if (longint'({cout, s}) != exp16) begin
      failures++;
      $display("FAIL N=16 %h+%h+%b -> %h", a, b, cin, {cout, s});
    end
    if (longint'({cout32, s32}) != exp32) begin
      failures++;
      $display("FAIL N=32 %h+%h+%b -> %h", a32, b32, cin, {cout32, s32});
    end
  endtask

  initial begin
    // A carry entering at bit 0 and running up through bit k.
    for (int k = 0; k < 32; k++) begin
      for (int c = 0; c < 2; c++) begin
        cin = c[0];
        a = 16'((32'h1 << (k + 1)) - 1); b = 16'(c == 0);
        a32 = 32'((64'h1 << (k + 1)) - 1); b32 = 32'(c == 0);
        check();
      end
    end
    for (int t = 0; t < 20000; t++) begin
      cin = 1'($urandom);
      a = 16'($urandom); b = 16'($urandom);
      a32 = $urandom; b32 = $urandom;
      if (t % 4 == 0) begin b = ~a; b32 = ~a32; end  // all-propagate words
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
