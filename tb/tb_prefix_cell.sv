// Self-checking testbench for prefix_cell: all 16 input combinations,
// compared with the meaning of the operator: the combined span generates a
// carry if the upper span generates one, or passes on one generated below;
// it propagates only if both spans propagate.
module tb_prefix_cell;
  import hc_pkg::*;
  gp_t hi, lo, out;
  int checks = 0, failures = 0;

  prefix_cell dut (.hi(hi), .lo(lo), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      hi = gp_t'(v[3:2]);
      lo = gp_t'(v[1:0]);
      #1;
      if (hi.g) exp_g = 1'b1;
      else if (hi.p) exp_g = lo.g;
      else exp_g = 1'b0;
      exp_p = (hi.p && lo.p);
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL hi=%b lo=%b out=%b", hi, lo, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
