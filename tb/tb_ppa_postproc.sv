// tb_ppa_postproc -- checks the sum stage with random half-sums and
// carries. For each scheme the half-sum is read as P-bar (Schemes I, II) or
// P (Scheme III), each carry is read as true or complemented by the stage
// that makes it (worked out here from the graph shape), and the expected
// sum bit is P_i xor c_{i-1}, with P_0 alone in bit 0 and the top carry as
// the carry-out.
module tb_ppa_postproc;
  import ppa_pkg::*;
  localparam int N = 32;
  logic [N-1:0] hp, c_raw, s1, s2, s3;
  logic co1, co2, co3;
  int checks = 0, failures = 0;

  ppa_postproc                           u1 (.hp, .c_raw, .sum(s1), .cout(co1));
  ppa_postproc #(.SCHEME(SCHEME_II))     u2 (.hp, .c_raw, .sum(s2), .cout(co2));
  ppa_postproc #(.SCHEME(SCHEME_III))    u3 (.hp, .c_raw, .sum(s3), .cout(co3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit carry_low(int i);
    int k, r, st;
    k = i / 4; r = i % 4;
    if (i == 0) st = 0;
    else if (k == 0) st = (r == 1) ? 1 : 2;
    else if (r == 2 && k != N / 4 - 1) st = k + 3;
    else st = k + 2;
    return st % 2 == 0;
  endfunction

  task automatic check_sum(string what, bit hp_low, logic [N-1:0] s, logic co);
    logic [N-1:0] p, c;
    for (int i = 0; i < N; i++) begin
      p[i] = hp_low ? !hp[i] : hp[i];
      c[i] = carry_low(i) ? !c_raw[i] : c_raw[i];
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (s[i] !== ((i == 0) ? p[0] : (p[i] ^ c[i-1]))) begin
        failures++;
        if (failures < 20) $display("FAIL %s bit %0d hp=%h c=%h", what, i, hp, c_raw);
      end
    end
    checks++;
    if (co !== c[N-1]) begin failures++; $display("FAIL %s cout", what); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      hp = $urandom; c_raw = $urandom;
      if (t == 0) begin hp = '0; c_raw = '0; end
      if (t == 1) begin hp = '1; c_raw = '1; end
      #1;
      check_sum("I",   1'b1, s1, co1);
      check_sum("II",  1'b1, s2, co2);
      check_sum("III", 1'b0, s3, co3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
