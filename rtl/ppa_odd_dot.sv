// ppa_odd_dot -- dot (prefix) operator cell for odd-numbered stages.
//
// Combines an upper group [i:j] with the adjacent lower group [j-1:k] into
// group [i:k]. Inputs arrive active low, as produced by pre-processing or by
// an even-stage cell; outputs leave active high:
//   g = NOT(gh_n AND (xh_n OR gl_n))  = Gh + Xh*Gl
//   x = NOT(xh_n OR xl_n)             = Xh * Xl
// In Scheme I the x wires carry propagate (P-bar in, P out); in Schemes II
// and III they carry kill (K in, K-bar out), which composes the same way.
// Both equations follow the published design; the single shared cell for all schemes
// is this design's choice. Purely combinational.
module ppa_odd_dot (
  input  logic gh_n,  // upper group generate, active low
  input  logic xh_n,  // upper group propagate (P-bar) or kill (K)
  input  logic gl_n,  // lower group generate, active low
  input  logic xl_n,  // lower group propagate (P-bar) or kill (K)
  output logic g,     // combined generate, active high
  output logic x      // combined propagate (P) or not-kill (K-bar)
);
  always_comb begin
    g = ~(gh_n & (xh_n | gl_n));
    x = ~(xh_n | xl_n);
  end
endmodule
