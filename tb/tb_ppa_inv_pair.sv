// tb_ppa_inv_pair -- exhaustive check of the inverter pair: both wires
// must come out complemented for all four input combinations.
module tb_ppa_inv_pair;
  logic g_i, x_i, g_o, x_o;
  int checks = 0, failures = 0;

  ppa_inv_pair dut (.g_i, .x_i, .g_o, .x_o);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {g_i, x_i} = 2'(v);
      #1;
      checks += 2;
      if (g_o !== (v[1] ? 1'b0 : 1'b1)) begin failures++; $display("FAIL v=%b g_o=%b", v[1:0], g_o); end
      if (x_o !== (v[0] ? 1'b0 : 1'b1)) begin failures++; $display("FAIL v=%b x_o=%b", v[1:0], x_o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
