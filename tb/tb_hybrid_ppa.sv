// tb_hybrid_ppa -- end-to-end test of the hybrid parallel prefix adder.
//
// The adder under test is the default configuration (32 bits, Scheme I),
// instantiated with no parameter overrides. Beside it run 32-bit adders in
// Schemes II and III, and 8- and 16-bit adders in all three schemes. Every
// result is compared with the integer sum a + b (low bits and carry-out).
// The 8-bit adders are tested exhaustively, the others with directed corner
// cases and random operands.
//
// Coverage counters, each of which must be hit: a carry-out; a carry
// travelling from bit 0 to bit 31 (every group propagating); a carry
// crossing each 4-bit group; and every carry c0..c31 seen both as 0 and 1,
// which exercises every semi-dot cell and inverter pair in both directions.
module tb_hybrid_ppa;
  import ppa_pkg::*;

  localparam int NRAND = 20000;

  logic [31:0] a, b;
  logic [31:0] s1, s2, s3;
  logic        co1, co2, co3;
  logic [15:0] a16, b16, s16_1, s16_2, s16_3;
  logic        co16_1, co16_2, co16_3;
  logic [7:0]  a8, b8, s8_1, s8_2, s8_3;
  logic        co8_1, co8_2, co8_3;

  int checks = 0, failures = 0;
  int n_cout = 0, n_full_ripple = 0;
  int n_group_cross [8];
  int n_carry_one [32], n_carry_zero [32];

  hybrid_ppa dut (.a(a), .b(b), .sum(s1), .cout(co1));
  hybrid_ppa #(.SCHEME(SCHEME_II))  u_s2 (.a(a), .b(b), .sum(s2), .cout(co2));
  hybrid_ppa #(.SCHEME(SCHEME_III)) u_s3 (.a(a), .b(b), .sum(s3), .cout(co3));

  hybrid_ppa #(.N(16))                        u16_1 (.a(a16), .b(b16), .sum(s16_1), .cout(co16_1));
  hybrid_ppa #(.N(16), .SCHEME(SCHEME_II))    u16_2 (.a(a16), .b(b16), .sum(s16_2), .cout(co16_2));
  hybrid_ppa #(.N(16), .SCHEME(SCHEME_III))   u16_3 (.a(a16), .b(b16), .sum(s16_3), .cout(co16_3));

  hybrid_ppa #(.N(8))                         u8_1 (.a(a8), .b(b8), .sum(s8_1), .cout(co8_1));
  hybrid_ppa #(.N(8), .SCHEME(SCHEME_II))     u8_2 (.a(a8), .b(b8), .sum(s8_2), .cout(co8_2));
  hybrid_ppa #(.N(8), .SCHEME(SCHEME_III))    u8_3 (.a(a8), .b(b8), .sum(s8_3), .cout(co8_3));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(string what, logic [31:0] s, logic co);
    logic [32:0] exp;
    exp = {1'b0, a} + {1'b0, b};
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h got %b_%h exp %h", what, a, b, co, s, exp);
    end
  endtask

  task automatic check16(string what, logic [15:0] s, logic co);
    logic [16:0] exp;
    exp = {1'b0, a16} + {1'b0, b16};
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h got %b_%h exp %h", what, a16, b16, co, s, exp);
    end
  endtask

  task automatic check8(string what, logic [7:0] s, logic co);
    logic [8:0] exp;
    exp = {1'b0, a8} + {1'b0, b8};
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h got %b_%h exp %h", what, a8, b8, co, s, exp);
    end
  endtask

  // Record which carry mechanisms the current 32-bit operands exercise.
  task automatic cover32();
    logic [31:0] p, c;
    logic        cin;
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

    // 32-bit adders: corner cases, then random operands.
    for (int t = 0; t < 8 + NRAND; t++) begin
      if (t < 8) begin
        a = corner_a[t]; b = corner_b[t];
      end else if (t % 16 == 0) begin
        // Long propagate runs: b is nearly the complement of a.
        a = $urandom; b = ~a ^ (32'd1 << ($urandom % 32));
      end else begin
        a = $urandom; b = $urandom;
      end
      a16 = a[15:0]; b16 = b[15:0];
      #1;
      check32("S1-32", s1, co1);
      check32("S2-32", s2, co2);
      check32("S3-32", s3, co3);
      check16("S1-16", s16_1, co16_1);
      check16("S2-16", s16_2, co16_2);
      check16("S3-16", s16_3, co16_3);
      cover32();
    end

    // 8-bit adders: every operand pair.
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        check8("S1-8", s8_1, co8_1);
        check8("S2-8", s8_2, co8_2);
        check8("S3-8", s8_3, co8_3);
      end

    // Every mechanism must have happened at least once.
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
    $display("coverage: cout=%0d full_ripple=%0d group_cross[1..7]=%0d %0d %0d %0d %0d %0d %0d",
             n_cout, n_full_ripple, n_group_cross[1], n_group_cross[2], n_group_cross[3],
             n_group_cross[4], n_group_cross[5], n_group_cross[6], n_group_cross[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
