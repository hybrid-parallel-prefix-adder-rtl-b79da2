// tb_ppa_even_semi_dot -- exhaustive check of the even-stage semi-dot cell.
// All 8 input combinations are applied; the expected output is the
// complement of "the group generates, or it propagates and a carry
// arrives".
module tb_ppa_even_semi_dot;
  logic gh, xh, cl, c_n;
  int checks = 0, failures = 0;

  ppa_even_semi_dot dut (.gh, .xh, .cl, .c_n);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      bit exp_c;
      {gh, xh, cl} = 3'(v);
      exp_c = gh || (xh && cl);
      #1;
      checks++;
      if (c_n !== !exp_c) begin failures++; $display("FAIL v=%b c_n=%b", v[2:0], c_n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
