// ppa_even_dot -- dot (prefix) operator cell for even-numbered stages.
//
// Combines an upper group [i:j] with the adjacent lower group [j-1:k] into
// group [i:k]. Inputs arrive active high from an odd-stage cell (or through
// an inverter pair); outputs leave active low, ready for the next odd stage:
//   g_n = NOT(gh OR (xh AND gl))   = complement of Gh + Xh*Gl
//   x_n = NOT(xh AND xl)           = complement of Xh * Xl
// Alternating this cell with ppa_odd_dot removes the output inverters a
// non-inverting dot cell would need. Purely combinational.
module ppa_even_dot (
  input  logic gh,   // upper group generate
  input  logic xh,   // upper group propagate (P) or not-kill (K-bar)
  input  logic gl,   // lower group generate
  input  logic xl,   // lower group propagate (P) or not-kill (K-bar)
  output logic g_n,  // combined generate, active low
  output logic x_n   // combined propagate, active low (P-bar or K)
);
  always_comb begin
    g_n = ~(gh | (xh & gl));
    x_n = ~(xh & xl);
  end
endmodule
