// tb_gp_combine: exhaustive check of the carry-monoid operator cell against
// the truth table of (g,p) o (g',p') = (g | p&g', p&p'), and of the identity
// element (0,1) on both sides.
module tb_gp_combine;
  import modgen_pkg::*;
  gp_t hi, lo, out;
  int checks = 0, failures = 0;

  gp_combine dut (.hi, .lo, .out);

  initial begin
    for (int v = 0; v < 16; v++) begin
      hi = gp_t'(v[3:2]);
      lo = gp_t'(v[1:0]);
      #1;
      checks++;
      if (out.g !== (v[3] | (v[2] & v[1])) || out.p !== (v[2] & v[0])) begin
        failures++;
        $display("FAIL hi=%b lo=%b out=%b", hi, lo, out);
      end
      // identity on the right and on the left
      if (v < 4) begin
        hi = gp_t'(v[1:0]); lo = GP_IDENTITY; #1;
        checks++; if (out !== hi) failures++;
        lo = gp_t'(v[1:0]); hi = GP_IDENTITY; #1;
        checks++; if (out !== lo) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
