// post_proc: correction bit W and post-processing unit of the sign detector.
//
// W is 1 exactly when floor((x2 - x1) / (2^n - 1)) equals -x1[n], i.e. when
// no extra -1 correction is needed. With x1' = x1[n-1:0] it is
//   W = (x2 > x1') | ((x2 == x1') & ~x1[n])
// The AND term arrives precomputed as eq_and (the AND gate sits one pipeline
// stage earlier); this unit holds the OR gate. W is the carry into bit 0 of
// S + 2C, so the sign bit, bit n-1 of q2 = S + 2C + W, is
//   sign = P_(n-1) ^ (G[n-2:0] | (P[n-2:0] & W))
//
// Purely combinational.
module post_proc (
  input  logic p_msb,
  input  logic g_low,
  input  logic p_low,
  input  logic gt,
  input  logic eq_and,
  output logic w,
  output logic sign
);

  assign w    = gt | eq_and;
  assign sign = p_msb ^ (g_low | (p_low & w));

endmodule
