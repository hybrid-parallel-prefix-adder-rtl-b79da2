// ppa_inv_pair -- the pair of inverters placed on a prefix-graph edge.
//
// A cell in stage s expects its inputs in the polarity produced by stage
// s-1. When an input comes from a stage an even distance back, its polarity
// is wrong, and one inverter on the generate wire and one on the
// propagate/kill wire turn (G, P) into (G-bar, P-bar) or back. This is the
// only place in the carry network where plain inverters remain.
// Purely combinational.
module ppa_inv_pair (
  input  logic g_i,  // generate, either polarity
  input  logic x_i,  // propagate/kill, same polarity as g_i
  output logic g_o,  // inverted generate
  output logic x_o   // inverted propagate/kill
);
  always_comb begin
    g_o = ~g_i;
    x_o = ~x_i;
  end
endmodule
