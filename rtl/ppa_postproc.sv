// ppa_postproc -- post-processing (sum) stage of the hybrid prefix adder.
//
// Sum bit i is P_i XOR c_{i-1}. The prefix network delivers each carry in
// true or complemented form depending on the stage that made it, and the
// pre-processing delivers P-bar (Schemes I, II) or P (Scheme III). Instead of
// restoring polarities with inverters, each bit uses an XOR or an XNOR gate:
// XNOR when exactly one of its two inputs is complemented, XOR otherwise.
// Bit 0 has no carry-in and is P_0 itself. The carry out of the top bit is
// returned in true form as cout; for N = 32 it comes from an odd stage and
// is already true, so cout is a plain wire from c_raw[31]. The published
// design states only what this stage computes; the per-bit gate choice is
// this design's.
// Purely combinational.
module ppa_postproc
  import ppa_pkg::*;
#(
  parameter int      N      = 32,
  parameter scheme_e SCHEME = SCHEME_I
) (
  input  logic [N-1:0] hp,     // P-bar (Schemes I, II) or P (Scheme III)
  input  logic [N-1:0] c_raw,  // carries, polarity from ppa_pkg
  output logic [N-1:0] sum,
  output logic         cout    // carry out of bit N-1, true form
);
  localparam bit HP_LOW = (SCHEME != SCHEME_III);

  if (HP_LOW) begin : g_s0_inv
    assign sum[0] = ~hp[0];
  end else begin : g_s0_direct
    assign sum[0] = hp[0];
  end

  for (genvar i = 1; i < N; i++) begin : g_sum
    if (HP_LOW != carry_active_low(N, i - 1)) begin : g_xnor
      assign sum[i] = ~(hp[i] ^ c_raw[i-1]);
    end else begin : g_xor
      assign sum[i] = hp[i] ^ c_raw[i-1];
    end
  end

  if (carry_active_low(N, N - 1)) begin : g_cout_inv
    assign cout = ~c_raw[N-1];
  end else begin : g_cout_direct
    assign cout = c_raw[N-1];
  end
endmodule
