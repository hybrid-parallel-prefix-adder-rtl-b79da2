// tb_ppa_prefix_tree -- checks the carry network against binary addition.
//
// Operands are generated, their bitwise generate and propagate/kill are
// formed here, and the network's carries are compared with the carries of
// an ordinary integer addition. Each carry is expected in the polarity of
// the stage that makes it, with the stage worked out here from the graph
// shape (4-bit groups, group k finishing in stage k+2, the third bit of an
// inner group one stage later). Instances: 32 bits fed with propagate,
// 32 bits fed with kill, and 16 and 8 bits fed with propagate. The node
// counts and depth of the 32-bit graph (23 dot, 31 semi-dot, depth 9) are
// checked too.
module tb_ppa_prefix_tree;
  import ppa_pkg::*;
  logic [31:0] a, b;
  logic [31:0] gn32, pn32, kn32, c32p, c32k;
  logic [15:0] c16;
  logic [7:0]  c8;
  int checks = 0, failures = 0;

  ppa_prefix_tree                u_p32 (.g_n(gn32), .x_n(pn32), .c_raw(c32p));
  ppa_prefix_tree                u_k32 (.g_n(gn32), .x_n(kn32), .c_raw(c32k));
  ppa_prefix_tree #(.N(16))      u_p16 (.g_n(gn32[15:0]), .x_n(pn32[15:0]), .c_raw(c16));
  ppa_prefix_tree #(.N(8))       u_p8  (.g_n(gn32[7:0]),  .x_n(pn32[7:0]),  .c_raw(c8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stage that produces carry i in an n-bit network.
  function automatic int exp_stage(int n, int i);
    int k, r;
    k = i / 4; r = i % 4;
    if (i == 0) return 0;
    if (k == 0) return (r == 1) ? 1 : 2;
    if (r == 2 && k != n / 4 - 1) return k + 3;
    return k + 2;
  endfunction

  // True carry out of bit i of a + b.
  function automatic bit true_carry(logic [31:0] x, logic [31:0] y, int i);
    longint unsigned m, s;
    m = (64'd1 << (i + 1)) - 1;
    s = (longint'(x) & m) + (longint'(y) & m);
    return s[i+1];
  endfunction

  task automatic check_carries(string what, int n, logic [31:0] c_raw);
    for (int i = 0; i < n; i++) begin
      bit exp;
      exp = true_carry(a, b, i);
      if (exp_stage(n, i) % 2 == 0) exp = !exp;
      checks++;
      if (c_raw[i] !== exp) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s c%0d a=%h b=%h got %b exp %b", what, i, a, b, c_raw[i], exp);
      end
    end
  endtask

  initial begin
    checks += 4;
    if (count_nodes(32, NODE_DOT) != 23) begin failures++; $display("FAIL dot count %0d", count_nodes(32, NODE_DOT)); end
    if (count_nodes(32, NODE_SEMI) != 31) begin failures++; $display("FAIL semi count %0d", count_nodes(32, NODE_SEMI)); end
    if (depth(32) != 9) begin failures++; $display("FAIL depth %0d", depth(32)); end
    if (carry_stage(32, 31) != 9) begin failures++; $display("FAIL c31 stage"); end

    for (int t = 0; t < 5000; t++) begin
      case (t)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = 32'd1; end          // carry ripples through every group
        2: begin a = '1; b = '1; end
        3: begin a = 32'hAAAA_AAAA; b = 32'h5555_5555; end
        4: begin a = 32'h7FFF_FFFF; b = 32'd1; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      gn32 = ~(a & b);
      pn32 = ~(a ^ b);
      kn32 = ~(a | b);
      #1;
      check_carries("P32", 32, c32p);
      check_carries("K32", 32, c32k);
      check_carries("P16", 16, {16'd0, c16});
      check_carries("P8",  8,  {24'd0, c8});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
