// max_star_tree: Jacobian logarithm of N metrics, ln(sum_k exp(a_k)).
//
// The operator max* is applied pairwise in a balanced tree,
//   max*(a,b) = max(a,b) + ln(1 + exp(-|a-b|)),
// with the correction term taken from a small lookup table (tbt_pkg::
// max_corr), the recursive table-based form named for the demapper and
// the Log-BCJR decoder. Metrics are in the 1/8 units of tbt_pkg. A value
// far below the others (such as a large negative "impossible" metric)
// contributes nothing, so callers may mask inputs that way.
//
// Interface/timing: combinational, N a power of two, N >= 2; log2(N)
// adder/compare levels.
module max_star_tree
  import tbt_pkg::*;
#(
  parameter int N = 8
) (
  input  met_t a [N],
  output met_t y
);

  localparam int LEVELS = $clog2(N);

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int W = N >> (l + 1);
    met_t o [W];
    for (genvar k = 0; k < W; k++) begin : g_node
      if (l == 0) begin : g_leaf
        assign o[k] = max_star(a[2*k], a[2*k+1]);
      end else begin : g_inner
        assign o[k] = max_star(g_lvl[l-1].o[2*k], g_lvl[l-1].o[2*k+1]);
      end
    end
  end

  assign y = g_lvl[LEVELS-1].o[0];

endmodule
