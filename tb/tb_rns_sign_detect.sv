// tb_rns_sign_detect: end-to-end test of the pipelined sign detector at its
// default size, n = 16 (moduli 131071, 65535, 65536; M is about 5.6e14).
//
// Stimulus is a number X in [0, M); the testbench forms the residues
// x1 = X mod (2^17-1), x2 = X mod (2^16-1), x3 = X mod 2^16 and expects
// sign = (X >= M/2). It also checks the correction bit W against its
// definition, W = 1 iff floor((x2 - x1)/(2^16-1)) == -x1[16], computed
// with signed integer division, so both the sign formula and W are
// checked independently of the circuit's structure.
//
// Timing: one triple per cycle may enter; each result must appear with
// out_valid exactly 2 cycles later, and no out_valid may appear without a
// matching input. Idle cycles are inserted at random.
//
// Mechanisms counted, each must occur at least once: both signs, each case
// of W (x2 > x1', x2 == x1' with x1[n] = 0, x2 == x1' with x1[n] = 1,
// x2 < x1'), x1[n] = 1, back-to-back inputs, pipeline bubbles, and the
// boundary numbers 0, M/2-1, M/2, M-1. Reset in mid-stream must flush the
// pipeline.
module tb_rns_sign_detect;

  localparam int N = 16;
  localparam longint unsigned M1 = (64'd1 << (N + 1)) - 1;
  localparam longint unsigned M2 = (64'd1 << N) - 1;
  localparam longint unsigned M3 = 64'd1 << N;
  localparam longint unsigned M  = M1 * M2 * M3;
  localparam int LAT = 2;

  int checks = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [N:0]   x1 = '0;
  logic [N-1:0] x2 = '0;
  logic [N-1:0] x3 = '0;
  logic         out_valid, sign, w;

  rns_sign_detect dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .x1(x1), .x2(x2), .x3(x3),
    .out_valid(out_valid), .sign(sign), .w(w)
  );

  always #5 clk = ~clk;

  // expected outputs, one entry per cycle, in order of entry
  typedef struct {
    logic            valid;
    logic            sign;
    logic            w;
    longint unsigned x;
  } exp_t;
  exp_t pipe [$];

  // mechanism counters
  int n_neg, n_pos, n_w_gt, n_w_eq0, n_w_eq1, n_w_lt, n_x1n, n_b2b, n_bubble, n_bound, n_flush;
  logic prev_valid = 1'b0;

  function automatic logic ref_w(longint unsigned x);
    longint d, q;
    longint unsigned r1, r2;
    r1 = x % M1;
    r2 = x % M2;
    d = longint'(r2) - longint'(r1);
    q = d / longint'(M2);
    if (d % longint'(M2) != 0 && d < 0) q = q - 1;   // floor division
    return (q == -longint'(r1 >> N));
  endfunction

  // Present X (or an idle cycle) for one clock and check what comes out.
  task automatic cycle(input logic v, input longint unsigned x);
    exp_t e, got;
    longint unsigned r1, r2;
    @(negedge clk);
    in_valid = v;
    r1 = x % M1;
    r2 = x % M2;
    x1 = (N+1)'(r1);
    x2 = N'(r2);
    x3 = N'(x % M3);
    e.valid = v;
    e.sign  = (x >= M / 2);
    e.w     = ref_w(x);
    e.x     = x;
    if (v) begin
      if (e.sign) n_neg++; else n_pos++;
      if (x2 > x1[N-1:0]) n_w_gt++;
      else if (x2 == x1[N-1:0] && !x1[N]) n_w_eq0++;
      else if (x2 == x1[N-1:0] && x1[N]) n_w_eq1++;
      else n_w_lt++;
      if (x1[N]) n_x1n++;
      if (prev_valid) n_b2b++;
      if (x == 0 || x == M / 2 - 1 || x == M / 2 || x == M - 1) n_bound++;
    end else if (prev_valid) n_bubble++;
    prev_valid = v;
    pipe.push_back(e);
    @(posedge clk);
    #1;
    if (pipe.size() >= LAT) begin
      got = pipe.pop_front();
      checks++;
      if (out_valid !== got.valid) begin
        failures++;
        $display("FAIL out_valid=%b expected %b (X=%0d)", out_valid, got.valid, got.x);
      end else if (got.valid) begin
        checks++;
        if (sign !== got.sign || w !== got.w) begin
          failures++;
          $display("FAIL X=%0d sign=%b exp %b, w=%b exp %b", got.x, sign, got.sign, w, got.w);
        end
      end
    end
  endtask

  function automatic longint unsigned rand_x();
    return {$urandom, $urandom} % M;
  endfunction

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned x, base;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // boundary numbers, back to back
    cycle(1, 0);
    cycle(1, M / 2 - 1);
    cycle(1, M / 2);
    cycle(1, M - 1);
    cycle(1, 1);
    cycle(1, M / 2 + 1);
    // numbers near the boundary
    for (int i = -40; i < 40; i++) cycle(1, 64'(longint'(M / 2) + longint'(i)));
    for (int i = 1; i < 40; i++) cycle(1, M - 64'(i));
    // numbers that hit x2 == x1' for both values of x1[n]: X = k*M1*M2 + r
    // has x1 = r mod M1, x2 = r mod M2; pick r with equal low parts
    for (int k = 0; k < 64; k++) begin
      base = (64'($urandom) % M3) * M1 * M2;
      x = 64'($urandom) % M2;                          // r < M2: x1 = x2 = r
      cycle(1, base + x);
      x = (64'd1 << N) + (64'($urandom) % (M2 - 1));    // r in [2^n, M1): x1[n] = 1
      cycle(1, base + (x % (M1 * M2)));
    end
    // random stream with random idle cycles
    for (int n = 0; n < 200000; n++) begin
      cycle(($urandom % 5) != 0, rand_x());
    end
    // reset in mid-stream flushes the pipeline
    cycle(1, rand_x());
    cycle(1, rand_x());
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL out_valid after reset"); end
    else n_flush++;
    pipe.delete();
    @(negedge clk);
    rst_n = 1'b1;
    prev_valid = 1'b0;
    for (int n = 0; n < 1000; n++) cycle(1, rand_x());
    for (int n = 0; n < LAT; n++) cycle(0, 0);

    begin
      automatic string names [11] = '{"negative", "positive", "W: x2>x1'", "W: x2==x1', x1[n]=0",
                            "W: x2==x1', x1[n]=1", "W: x2<x1'", "x1[n]=1", "back-to-back",
                            "bubble", "boundary", "reset flush"};
      automatic int counts [11];
      counts = '{n_neg, n_pos, n_w_gt, n_w_eq0, n_w_eq1, n_w_lt, n_x1n, n_b2b, n_bubble, n_bound, n_flush};
      for (int i = 0; i < 11; i++) begin
        $display("  %-22s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
