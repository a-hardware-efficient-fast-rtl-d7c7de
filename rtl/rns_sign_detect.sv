// rns_sign_detect: pipelined sign detector for the RNS moduli set
// {2^(N+1)-1, 2^N-1, 2^N}.
//
// A number X in [0, M), M = (2^(N+1)-1)(2^N-1)2^N, is held as residues
// x1 = X mod (2^(N+1)-1), x2 = X mod (2^N-1), x3 = X mod 2^N. X stands for a
// negative value when X >= M/2. The highest mixed-radix digit of X,
//   alpha = |x3 + x2 - 2*x1 + floor((x2 - x1)/(2^N-1))|_(2^N),
// is at least 2^(N-1) exactly in that case, so the sign is its MSB. Written
// for hardware,
//   alpha = |~x1'' + x2 + x3 + W|_(2^N),
// with x1'' = {x1[N-2:0], x1[N]} (2*x1 + x1[N] mod 2^N) and the correction
// bit W = (x2 > x1') | ((x2 == x1') & ~x1[N]), x1' = x1[N-1:0].
//
// Pipeline (three stages, two register ranks between them):
//   stage 1  csa_mod2n reduces ~x1'', x2, x3 to S, C; rns_comparator
//            forms x2 > x1' and x2 == x1' in parallel
//   stage 2  carry_gen forms P_(N-1), G[N-2:0], P[N-2:0]; the AND gate forms
//            (x2 == x1') & ~x1[N]
//   stage 3  post_proc: OR gate gives W, then the sign bit
// The stage split follows the pipelined design; the register ranks being
// edge-triggered flip-flops, the valid flag and the asynchronous active-low
// reset are this design's choices.
//
// Interface and timing: one residue triple can be accepted every cycle. A
// triple sampled with in_valid at clock edge k gives sign and out_valid after
// edge k+1 (latency 2 cycles). w is the correction bit W of the same triple,
// brought out for observation. Residues must be in range:
// x1 <= 2^(N+1)-2, x2 <= 2^N-2.
module rns_sign_detect #(
  parameter int unsigned N = rns_sign_pkg::DEFAULT_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N:0]   x1,
  input  logic [N-1:0] x2,
  input  logic [N-1:0] x3,
  output logic         out_valid,
  output logic         sign,
  output logic         w
);

  if (N < 3) begin : g_bad_n
    $error("rns_sign_detect: N must be at least 3");
  end

  // ---------------- stage 1: CSA mod 2^N and comparator ----------------
  typedef struct packed {
    logic         valid;
    logic [N-1:0] s;
    logic [N-2:0] cy;
    logic         gt;    // x2 >  x1'
    logic         eq;    // x2 == x1'
    logic         x1n;   // x1[N]
  } stage1_t;

  typedef struct packed {
    logic valid;
    logic p_msb;
    logic g_low;
    logic p_low;
    logic gt;
    logic eq_and;
  } stage2_t;

  logic [N-1:0] x1_pp;   // x1''
  stage1_t      st1_d, st1_q;
  stage2_t      st2_d, st2_q;

  assign x1_pp = {x1[N-2:0], x1[N]};

  csa_mod2n #(.N(N)) u_csa (
    .a (~x1_pp),
    .b (x2),
    .c (x3),
    .s (st1_d.s),
    .cy(st1_d.cy)
  );

  rns_comparator #(.N(N)) u_cmp (
    .a (x2),
    .b (x1[N-1:0]),
    .gt(st1_d.gt),
    .eq(st1_d.eq)
  );

  assign st1_d.valid = in_valid;
  assign st1_d.x1n   = x1[N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st1_q <= '0;
    else        st1_q <= st1_d;
  end

  // ---------------- stage 2: carry generation and AND gate ----------------
  carry_gen #(.N(N)) u_cg (
    .s    (st1_q.s),
    .cy   (st1_q.cy),
    .p_msb(st2_d.p_msb),
    .g_low(st2_d.g_low),
    .p_low(st2_d.p_low)
  );

  assign st2_d.valid  = st1_q.valid;
  assign st2_d.gt     = st1_q.gt;
  assign st2_d.eq_and = st1_q.eq & ~st1_q.x1n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st2_q <= '0;
    else        st2_q <= st2_d;
  end

  // ---------------- stage 3: OR gate and post-processing ----------------
  post_proc u_pp (
    .p_msb (st2_q.p_msb),
    .g_low (st2_q.g_low),
    .p_low (st2_q.p_low),
    .gt    (st2_q.gt),
    .eq_and(st2_q.eq_and),
    .w     (w),
    .sign  (sign)
  );

  assign out_valid = st2_q.valid;

  // Input residues must be proper residues of their moduli.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (x1 != {(N+1){1'b1}}) && (x2 != {N{1'b1}}))
    else $error("rns_sign_detect: residue out of range");

endmodule
