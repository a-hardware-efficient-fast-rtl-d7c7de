// carry_gen: carry generation unit of the sign detector.
//
// The detector needs only bit N-1 of q2 = S + 2*C + W (mod 2^N). This unit
// prepares everything for that bit that does not depend on W:
//   * bit pairs (a_i, b_i) = (s[i], 2C bit i), i.e. b_0 = 0, b_i = cy[i-1];
//   * square cells: g_i = a_i & b_i, p_i = a_i ^ b_i;
//   * a pg_tree over bits N-2..0 giving G[N-2:0] and P[N-2:0];
//   * the half sum of the top bit, P_(N-1) = s[N-1] ^ cy[N-2], which is only
//     passed on (the white-circle buffer of the drawing).
// These three signals go to the post-processing unit, where W enters as the
// carry into bit 0:  carry into bit N-1 = G[N-2:0] | P[N-2:0] & W.
//
// Purely combinational.
module carry_gen #(
  parameter int unsigned N = rns_sign_pkg::DEFAULT_N
) (
  input  logic [N-1:0] s,
  input  logic [N-2:0] cy,
  output logic         p_msb,
  output logic         g_low,
  output logic         p_low
);

  logic [N-1:0] b;   // the carry word shifted to its weight
  logic [N-2:0] gi, pi;

  assign b     = {cy, 1'b0};
  assign gi    = s[N-2:0] & b[N-2:0];
  assign pi    = s[N-2:0] ^ b[N-2:0];
  assign p_msb = s[N-1] ^ b[N-1];

  pg_tree #(.W(N-1)) u_tree (
    .g    (gi),
    .pr   (pi),
    .g_grp(g_low),
    .p_grp(p_low)
  );

endmodule
