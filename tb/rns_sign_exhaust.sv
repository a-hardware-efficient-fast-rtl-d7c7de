// rns_sign_exhaust: testbench helper that drives every number of the dynamic
// range through a rns_sign_detect of word size N and checks each sign.
//
// After start rises it presents X = 0, 1, ..., M-1 on consecutive cycles,
// M = (2^(N+1)-1)(2^N-1)2^N, as residues, and compares sign with
// (X >= M/2) exactly two cycles later. done rises when the last result has
// been checked; checks and failures count the comparisons.
module rns_sign_exhaust #(
  parameter int N = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam longint unsigned M1 = (64'd1 << (N + 1)) - 1;
  localparam longint unsigned M2 = (64'd1 << N) - 1;
  localparam longint unsigned M3 = 64'd1 << N;
  localparam longint unsigned M  = M1 * M2 * M3;

  logic         in_valid;
  logic [N:0]   x1;
  logic [N-1:0] x2, x3;
  logic         out_valid, sign;

  rns_sign_detect #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .x1(x1), .x2(x2), .x3(x3),
    .out_valid(out_valid), .sign(sign), .w()
  );

  longint unsigned exp_x [$];

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    in_valid = 1'b0;
    x1 = '0; x2 = '0; x3 = '0;
    wait (start);
    for (longint unsigned x = 0; x <= M; x++) begin
      @(negedge clk);
      in_valid = (x < M);
      x1 = (N+1)'(x % M1);
      x2 = N'(x % M2);
      x3 = N'(x % M3);
      if (x < M) exp_x.push_back(x);
      @(posedge clk);
      #1;
      if (x >= 1) begin
        checks++;
        if (!out_valid) begin
          failures++;
          $display("FAIL N=%0d: no result for X=%0d", N, exp_x[0]);
        end else if (sign !== (exp_x[0] >= M / 2)) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d X=%0d sign=%b", N, exp_x[0], sign);
        end
        void'(exp_x.pop_front());
      end
    end
    done = 1'b1;
  end

endmodule
