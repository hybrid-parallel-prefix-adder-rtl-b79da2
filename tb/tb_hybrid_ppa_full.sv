// tb_hybrid_ppa_full -- the adder in its default configuration only
// (32 bits, Scheme I, no parameter overrides).
//
// Applies, one pair every 10 ns, directed corner cases (zero, all ones plus one, full overflow,
// alternating patterns) and random operands, some built so that long
// propagate runs occur, and compares {cout, sum} with the integer a + b.
// It also counts carry-outs, a carry running from bit 0 to bit 31, a carry
// crossing each 4-bit group, and every carry seen both as 0 and 1; each of
// these must occur at least once.
module tb_hybrid_ppa_full;
  localparam int NRAND = 100000;

  logic [31:0] a, b, s;
  logic        co;
  int checks = 0, failures = 0;
  int n_cout = 0, n_full_ripple = 0;
  int n_group_cross [8];
  int n_carry_one [32], n_carry_zero [32];

  hybrid_ppa dut (.a(a), .b(b), .sum(s), .cout(co));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_and_cover();
    logic [32:0] exp;
    logic [31:0] p, c;
    logic        cin;
    exp = {1'b0, a} + {1'b0, b};
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL a=%h b=%h got %b_%h exp %h", a, b, co, s, exp);
    end
    p = a ^ b;
    cin = 1'b0;
    for (int i = 0; i < 32; i++) begin
      c[i] = (a[i] & b[i]) | (p[i] & cin);
      cin = c[i];
      if (c[i]) n_carry_one[i]++; else n_carry_zero[i]++;
    end
    if (c[31]) n_cout++;
    if (a[0] && b[0] && (p[31:1] == '1)) n_full_ripple++;
    for (int k = 1; k < 8; k++)
      if (c[4*k-1] && (p[4*k +: 4] == 4'hF)) n_group_cross[k]++;
  endtask

  initial begin
    logic [31:0] corner_a [8], corner_b [8];
    corner_a = '{32'h0, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'h7FFF_FFFF,
                 32'hAAAA_AAAA, 32'h8000_0000, 32'h0F0F_0F0F, 32'h1234_5678};
    corner_b = '{32'h0, 32'h1,         32'hFFFF_FFFF, 32'h1,
                 32'h5555_5555, 32'h8000_0000, 32'hF0F0_F0F1, 32'h8765_4321};
    for (int t = 0; t < 8 + NRAND; t++) begin
      if (t < 8) begin
        a = corner_a[t]; b = corner_b[t];
      end else if (t % 16 == 0) begin
        a = $urandom; b = ~a ^ (32'd1 << ($urandom % 32));
      end else begin
        a = $urandom; b = $urandom;
      end
      #10;  // a new operand pair every 10 ns
      check_and_cover();
    end

    checks++;
    if (n_cout == 0) begin failures++; $display("FAIL no carry-out seen"); end
    checks++;
    if (n_full_ripple == 0) begin failures++; $display("FAIL no full-width carry ripple seen"); end
    for (int k = 1; k < 8; k++) begin
      checks++;
      if (n_group_cross[k] == 0) begin failures++; $display("FAIL no carry crossed group %0d", k); end
    end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (n_carry_one[i] == 0 || n_carry_zero[i] == 0) begin
        failures++; $display("FAIL carry c%0d not seen at both values", i);
      end
    end
    $display("coverage: cout=%0d full_ripple=%0d", n_cout, n_full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
