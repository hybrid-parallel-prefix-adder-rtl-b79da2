// ppa_odd_semi_dot -- semi-dot operator cell for odd-numbered stages.
//
// The last node of a column: combines the group term [i:j] with the carry
// G[j-1:0] arriving from below and produces the carry c_i = G[i:0]. Only the
// generate half of the dot operator is built, since no propagate term is
// needed beyond this point. Inputs are active low, the carry leaves in true
// form:
//   c = NOT(gh_n AND (xh_n OR cl_n)) = Gh + Xh*c_{j-1}
// Purely combinational.
module ppa_odd_semi_dot (
  input  logic gh_n,  // group generate [i:j], active low
  input  logic xh_n,  // group propagate (P-bar) or kill (K) [i:j]
  input  logic cl_n,  // carry c_{j-1}, complemented
  output logic c      // carry c_i, true form
);
  always_comb c = ~(gh_n & (xh_n | cl_n));
endmodule
