// ppa_even_semi_dot -- semi-dot operator cell for even-numbered stages.
//
// The last node of a column in an even stage: combines the group term [i:j]
// (active high) with the true-form carry c_{j-1} and produces the
// complemented carry:
//   c_n = NOT(gh OR (xh AND cl)) = complement of Gh + Xh*c_{j-1}
// Post-processing absorbs the complement by using XOR instead of XNOR for
// that bit's sum. Purely combinational.
module ppa_even_semi_dot (
  input  logic gh,   // group generate [i:j]
  input  logic xh,   // group propagate (P) or not-kill (K-bar) [i:j]
  input  logic cl,   // carry c_{j-1}, true form
  output logic c_n   // carry c_i, complemented
);
  always_comb c_n = ~(gh | (xh & cl));
endmodule
