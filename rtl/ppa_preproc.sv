// ppa_preproc -- pre-processing stage (stage 0) of the hybrid prefix adder.
//
// For every operand bit it forms the signals the prefix network starts
// from, all in active-low form so that the first (odd) stage can use
// inverting cells directly:
//   Scheme I  : g_n = NAND(a,b), x = P-bar = XNOR(a,b), hp = P-bar
//   Scheme II : g_n = NAND(a,b), x = K = NOR(a,b),      hp = P-bar = XNOR(a,b)
//   Scheme III: g_n = NAND(a,b), x = K = NOR(a,b),      hp = P = NOR(K, G)
// Schemes II and III feed kill instead of propagate into the network; the
// carry result is the same because a bit that generates also does not kill.
// Scheme III saves the XNOR gate and derives propagate from the two signals
// it already has. The gate choices follow the published design; the "hp" (half-sum)
// output grouping is this design's. Purely combinational.
module ppa_preproc
  import ppa_pkg::*;
#(
  parameter int      N      = 32,
  parameter scheme_e SCHEME = SCHEME_I
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g_n,  // bit generate, active low
  output logic [N-1:0] x,    // P-bar (Scheme I) or K (Schemes II, III)
  output logic [N-1:0] hp    // P-bar (Schemes I, II) or P (Scheme III)
);
  logic [N-1:0] k;  // kill, a NOR b

  always_comb begin
    g_n = ~(a & b);
    k   = ~(a | b);
    unique case (SCHEME)
      SCHEME_I: begin
        x  = ~(a ^ b);
        hp = ~(a ^ b);
      end
      SCHEME_II: begin
        x  = k;
        hp = ~(a ^ b);
      end
      default: begin  // SCHEME_III
        x  = k;
        hp = ~(k | ~g_n);
      end
    endcase
  end
endmodule
