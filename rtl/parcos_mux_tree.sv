// parcos_mux_tree: one 1-of-N multiplexer of the communication matrix,
// built as a binary tree of 2:1 selections.
//
// Level k of the tree is steered by a single control bit c[k]: level 0 picks
// between neighbouring inputs (D0/D1, D2/D3, ...) with C0, the next level
// between pairs of those with C1, and so on up to C4 at the root, which drives
// the output Y. The result is y = d[c]. This follows the tree of the
// original design's multiplexer drawing, where each level has its own control pair
// (Ck and its complement). The paired n- and p-channel pass-transistor trees of
// the chip, sized for equal rise and fall delay, are a circuit detail that
// has no logic counterpart here: both trees compute the same selection.
//
// Interface: d[N-1:0] data inputs, c[$clog2(N)-1:0] select, y output.
// Timing: purely combinational; a bit-serial stream passes straight through.
module parcos_mux_tree #(
  parameter int unsigned N = 32,
  localparam int unsigned LV = $clog2(N)
) (
  input  logic [N-1:0]  d,
  input  logic [LV-1:0] c,
  output logic          y
);

  // node[k] holds the N>>k outputs of tree level k (level 0 = the inputs).
  logic [N-1:0] node [LV+1];

  assign node[0] = d;

  for (genvar k = 0; k < LV; k++) begin : g_level
    for (genvar j = 0; j < (N >> (k + 1)); j++) begin : g_node
      assign node[k+1][j] = c[k] ? node[k][2*j+1] : node[k][2*j];
    end
    // Upper bits of this level's vector carry no node.
    assign node[k+1][N-1:(N>>(k+1))] = '0;
  end

  assign y = node[LV][0];

endmodule
