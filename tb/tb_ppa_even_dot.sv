// tb_ppa_even_dot -- exhaustive check of the even-stage dot cell.
// All 16 input combinations are applied; the expected active-low outputs
// are the complements of the group generate and propagate worked out from
// the active-high inputs.
module tb_ppa_even_dot;
  logic gh, xh, gl, xl, g_n, x_n;
  int checks = 0, failures = 0;

  ppa_even_dot dut (.gh, .xh, .gl, .xl, .g_n, .x_n);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bit G, X;
      {gh, xh, gl, xl} = 4'(v);
      G = gh ? 1'b1 : (xh ? gl : 1'b0);
      X = (xh && xl);
      #1;
      checks += 2;
      if (g_n !== !G) begin failures++; $display("FAIL v=%b g_n=%b", v[3:0], g_n); end
      if (x_n !== !X) begin failures++; $display("FAIL v=%b x_n=%b", v[3:0], x_n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
