// tb_ppa_preproc -- checks the pre-processing stage in all three schemes.
// Random and directed operand pairs are applied to one instance per scheme.
// Expected values come from the count of ones in each bit pair: 2 means
// generate, 0 means kill, 1 means propagate.
module tb_ppa_preproc;
  import ppa_pkg::*;
  localparam int N = 32;
  logic [N-1:0] a, b;
  logic [N-1:0] g_n1, x1, hp1, g_n2, x2, hp2, g_n3, x3, hp3;
  int checks = 0, failures = 0;

  ppa_preproc #(.N(N), .SCHEME(SCHEME_I))   u1 (.a, .b, .g_n(g_n1), .x(x1), .hp(hp1));
  ppa_preproc #(.N(N), .SCHEME(SCHEME_II))  u2 (.a, .b, .g_n(g_n2), .x(x2), .hp(hp2));
  ppa_preproc #(.N(N), .SCHEME(SCHEME_III)) u3 (.a, .b, .g_n(g_n3), .x(x3), .hp(hp3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_bit(string what, logic got, logic exp, int i);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s bit %0d a=%h b=%h got %b exp %b", what, i, a, b, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = '0; end
        3: begin a = 32'h5555_5555; b = 32'h3333_3333; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      for (int i = 0; i < N; i++) begin
        int ones;
        logic gen, kil, pro;
        ones = int'(a[i]) + int'(b[i]);
        gen = (ones == 2); kil = (ones == 0); pro = (ones == 1);
        check_bit("I g_n",   g_n1[i], !gen, i);
        check_bit("I x",     x1[i],   !pro, i);
        check_bit("I hp",    hp1[i],  !pro, i);
        check_bit("II g_n",  g_n2[i], !gen, i);
        check_bit("II x",    x2[i],   kil,  i);
        check_bit("II hp",   hp2[i],  !pro, i);
        check_bit("III g_n", g_n3[i], !gen, i);
        check_bit("III x",   x3[i],   kil,  i);
        check_bit("III hp",  hp3[i],  pro,  i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
