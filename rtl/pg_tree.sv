// pg_tree: group generate/propagate of a W-bit field by a binary prefix tree.
//
// Every bit i brings a pair (g[i], pr[i]). The tree merges neighbouring pairs
// level by level with the black-dot operator
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo
// until one pair (g_grp, p_grp) = (G[W-1:0], P[W-1:0]) is left, in
// ceil(log2 W) operator levels. This is the reduction drawn for the carry
// generation unit and the comparator of the sign detector. When W is not a
// power of two the field is padded on its least significant side with the
// identity pair (G=0, P=1); such a node reduces to the plain wire (the
// "white circle" buffer cell) of the drawings.
//
// Purely combinational; no clock.
module pg_tree
  import rns_sign_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] pr,
  output logic         g_grp,
  output logic         p_grp
);

  localparam int unsigned LEVELS = $clog2(W);
  localparam int unsigned L      = 1 << LEVELS;

  if (W < 1) begin : g_bad_w
    $error("pg_tree: W must be at least 1");
  end

  // Level 0: the input pairs, aligned to the top of an L-wide field.
  pg_t lvl0 [L];
  always_comb begin
    for (int unsigned j = 0; j < L; j++) begin
      if (j + W < L) lvl0[j] = PG_IDENTITY;
      else           lvl0[j] = '{g: g[j-(L-W)], p: pr[j-(L-W)]};
    end
  end

  for (genvar k = 1; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned NODES = L >> k;
    pg_t node [NODES];
    for (genvar j = 0; j < NODES; j++) begin : g_node
      if (k == 1) begin : g_first
        assign node[j] = pg_combine(lvl0[2*j+1], lvl0[2*j]);
      end else begin : g_next
        assign node[j] = pg_combine(g_lvl[k-1].node[2*j+1], g_lvl[k-1].node[2*j]);
      end
    end
  end

  if (LEVELS == 0) begin : g_root0
    assign g_grp = lvl0[0].g;
    assign p_grp = lvl0[0].p;
  end else begin : g_root
    assign g_grp = g_lvl[LEVELS].node[0].g;
    assign p_grp = g_lvl[LEVELS].node[0].p;
  end

endmodule
