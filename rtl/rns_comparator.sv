// rns_comparator: N-bit magnitude comparator of the sign detector.
//
// Returns gt = (a > b) and eq = (a == b) for unsigned a, b. In the detector
// a is the residue x2 and b is x1', the N low bits of x1. Each bit pair gives
// a "greater" flag a[i] & ~b[i] and an "equal" flag a[i] ~^ b[i]; a binary
// tree of the same black-dot operator as the carry tree (pg_tree) merges
// them from the most significant bit downwards:
//   GT = GT_hi | (EQ_hi & GT_lo),  EQ = EQ_hi & EQ_lo
// The tree shape (log2 N levels, N/2, N/4, ... nodes) follows the n = 16
// drawing of the comparator; the per-bit flags are this design's choice.
//
// Purely combinational.
module rns_comparator #(
  parameter int unsigned N = rns_sign_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         gt,
  output logic         eq
);

  logic [N-1:0] bit_gt, bit_eq;

  assign bit_gt = a & ~b;
  assign bit_eq = a ~^ b;

  pg_tree #(.W(N)) u_tree (
    .g    (bit_gt),
    .pr   (bit_eq),
    .g_grp(gt),
    .p_grp(eq)
  );

endmodule
