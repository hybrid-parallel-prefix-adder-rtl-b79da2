// hybrid_ppa -- N-bit hybrid parallel prefix adder (top level).
//
// sum = (a + b) mod 2^N and cout = carry out of bit N-1, with no carry-in.
// Three combinational stages:
//   ppa_preproc     bitwise generate and propagate/kill, active low
//   ppa_prefix_tree carry network of alternating odd/even inverting cells,
//                   4-bit groups rippling one stage per group (23 dot and
//                   31 semi-dot nodes, depth 9 for N = 32)
//   ppa_postproc    sum bits by XOR/XNOR with each carry in its own polarity,
//                   and the carry-out in true form
// SCHEME selects the signal set: I = generate/propagate, II = generate/kill,
// III = generate/kill with propagate derived by a NOR. The adder structure
// and the three schemes follow the published design; making all three selectable in
// one module, the default Scheme I, the carry-out port and widths other than
// 32 are this design's choices. There is no clock: the result is valid one
// combinational delay after the operands change.
module hybrid_ppa
  import ppa_pkg::*;
#(
  parameter int      N      = 32,
  parameter scheme_e SCHEME = SCHEME_I
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] g_n, x, hp, c_raw;

  ppa_preproc #(.N(N), .SCHEME(SCHEME)) u_pre (
    .a(a), .b(b), .g_n(g_n), .x(x), .hp(hp)
  );

  ppa_prefix_tree #(.N(N)) u_tree (
    .g_n(g_n), .x_n(x), .c_raw(c_raw)
  );

  ppa_postproc #(.N(N), .SCHEME(SCHEME)) u_post (
    .hp(hp), .c_raw(c_raw), .sum(sum), .cout(cout)
  );
endmodule
