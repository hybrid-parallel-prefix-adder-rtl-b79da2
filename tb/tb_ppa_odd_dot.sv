// tb_ppa_odd_dot -- exhaustive check of the odd-stage dot cell.
// All 16 input combinations are applied. The expected outputs are worked
// out from the active-high meaning of the inputs: the combined group
// generates if the upper group generates, or propagates a lower generate;
// it propagates if both halves propagate.
module tb_ppa_odd_dot;
  logic gh_n, xh_n, gl_n, xl_n, g, x;
  int checks = 0, failures = 0;

  ppa_odd_dot dut (.gh_n, .xh_n, .gl_n, .xl_n, .g, .x);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bit Gh, Xh, Gl, Xl, exp_g, exp_x;
      {gh_n, xh_n, gl_n, xl_n} = 4'(v);
      Gh = !gh_n; Xh = !xh_n; Gl = !gl_n; Xl = !xl_n;
      exp_g = Gh ? 1'b1 : (Xh ? Gl : 1'b0);
      exp_x = (Xh && Xl);
      #1;
      checks += 2;
      if (g !== exp_g) begin failures++; $display("FAIL v=%b g=%b exp %b", v[3:0], g, exp_g); end
      if (x !== exp_x) begin failures++; $display("FAIL v=%b x=%b exp %b", v[3:0], x, exp_x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
