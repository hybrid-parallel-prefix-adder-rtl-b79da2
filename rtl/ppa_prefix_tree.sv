// ppa_prefix_tree -- carry (prefix) network of the hybrid parallel prefix
// adder.
//
// The operand is cut into 4-bit groups. In stage 1 each group pairs bits
// (b+1:b) and (b+3:b+2); in stage 2 it forms its group term (b+3:b). The
// carry out of group k is produced in stage k+2 from the carry of group k-1
// by semi-dot nodes, so group carries step one stage per group along the
// main diagonal. Inside a group, c(b+3), c(b+1) and c(b) are made together
// from c(b-1); c(b+2) follows one stage later from c(b+1), except in the top
// group, which has an extra dot (b+2:b) so that all four of its carries are
// ready in the last stage. For N = 32: 23 dot nodes, 31 semi-dot nodes,
// depth 9. The node list lives in ppa_pkg::node().
//
// Odd stages use ppa_odd_dot / ppa_odd_semi_dot (active-low in, active-high
// out), even stages ppa_even_dot / ppa_even_semi_dot (the reverse). An input
// taken from a stage an even distance back passes a ppa_inv_pair. Because of
// this, each carry leaves in the polarity of the stage that made it: c_raw[i]
// is the true carry when ppa_pkg::carry_active_low(N, i) is 0 and its
// complement otherwise. c_raw[0] is c0 = G0-bar, the input g_n[0] itself:
// no node is needed for bit 0. Node positions that hold no cell, and the
// propagate output of semi-dot nodes, are tied low and left unused.
//
// The graph for N = 32 follows the published prefix graph; other widths
// extend its rule and are this design's own. Purely combinational.
module ppa_prefix_tree
  import ppa_pkg::*;
#(
  parameter int N = 32
) (
  input  logic [N-1:0] g_n,   // stage-0 generate, active low
  input  logic [N-1:0] x_n,   // stage-0 propagate (P-bar) or kill (K)
  output logic [N-1:0] c_raw  // carries c_i = G[i:0], polarity per stage
);
  localparam int D = depth(N);

  // g_stage[s].gv[i] / .xv[i]: output of the node in stage s, column i, in
  // the polarity of stage s. Positions without a node are tied low and
  // unused. Stage 0 holds the pre-processing signals.

  if (!width_ok(N)) begin : g_bad_width
    $error("ppa_prefix_tree: N must be a multiple of 4 and at least 8");
  end

  for (genvar s = 0; s <= D; s++) begin : g_stage
    logic [N-1:0] gv, xv;
    for (genvar i = 0; i < N; i++) begin : g_col
      localparam node_t ND = node(N, s, i);
      if (s == 0) begin : g_input
        assign gv[i] = g_n[i];
        assign xv[i] = x_n[i];
      end else if (ND.kind == NODE_NONE) begin : g_none
        assign gv[i] = 1'b0;
        assign xv[i] = 1'b0;
      end else begin : g_node
        logic gh, xh, gl;

        // Upper input: the same column, from an earlier stage.
        if (hi_needs_inv(N, s, i)) begin : g_hi_inv
          ppa_inv_pair u_inv (
            .g_i(g_stage[ND.hi_stage].gv[i]), .x_i(g_stage[ND.hi_stage].xv[i]),
            .g_o(gh), .x_o(xh)
          );
        end else begin : g_hi_direct
          assign gh = g_stage[ND.hi_stage].gv[i];
          assign xh = g_stage[ND.hi_stage].xv[i];
        end

        if (ND.kind == NODE_DOT) begin : g_dot
          logic xl;
          if (lo_needs_inv(N, s, i)) begin : g_lo_inv
            ppa_inv_pair u_inv (
              .g_i(g_stage[ND.lo_stage].gv[ND.lo_col]), .x_i(g_stage[ND.lo_stage].xv[ND.lo_col]),
              .g_o(gl), .x_o(xl)
            );
          end else begin : g_lo_direct
            assign gl = g_stage[ND.lo_stage].gv[ND.lo_col];
            assign xl = g_stage[ND.lo_stage].xv[ND.lo_col];
          end
          if (s % 2 == 1) begin : g_odd
            ppa_odd_dot u_cell (
              .gh_n(gh), .xh_n(xh), .gl_n(gl), .xl_n(xl),
              .g(gv[i]), .x(xv[i])
            );
          end else begin : g_even
            ppa_even_dot u_cell (
              .gh(gh), .xh(xh), .gl(gl), .xl(xl),
              .g_n(gv[i]), .x_n(xv[i])
            );
          end
        end else begin : g_semi
          // The lower input is a carry; only its generate wire is used.
          if (lo_needs_inv(N, s, i)) begin : g_lo_inv
            assign gl = ~g_stage[ND.lo_stage].gv[ND.lo_col];
          end else begin : g_lo_direct
            assign gl = g_stage[ND.lo_stage].gv[ND.lo_col];
          end
          assign xv[i] = 1'b0;  // a semi-dot has no propagate output
          if (s % 2 == 1) begin : g_odd
            ppa_odd_semi_dot u_cell (
              .gh_n(gh), .xh_n(xh), .cl_n(gl), .c(gv[i])
            );
          end else begin : g_even
            ppa_even_semi_dot u_cell (
              .gh(gh), .xh(xh), .cl(gl), .c_n(gv[i])
            );
          end
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_carry
    assign c_raw[i] = g_stage[carry_stage(N, i)].gv[i];
  end
endmodule
