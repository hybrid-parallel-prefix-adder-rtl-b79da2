// tb_ppa_odd_semi_dot -- exhaustive check of the odd-stage semi-dot cell.
// All 8 input combinations are applied; the expected carry is "the group
// generates, or it propagates and a carry arrives", with the inputs read as
// active low.
module tb_ppa_odd_semi_dot;
  logic gh_n, xh_n, cl_n, c;
  int checks = 0, failures = 0;

  ppa_odd_semi_dot dut (.gh_n, .xh_n, .cl_n, .c);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      bit exp_c;
      {gh_n, xh_n, cl_n} = 3'(v);
      exp_c = (!gh_n) || (!xh_n && !cl_n);
      #1;
      checks++;
      if (c !== exp_c) begin failures++; $display("FAIL v=%b c=%b exp %b", v[2:0], c, exp_c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
