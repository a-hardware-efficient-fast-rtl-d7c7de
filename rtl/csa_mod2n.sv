// csa_mod2n: carry-save adder modulo 2^N.
//
// Reduces three N-bit operands to a sum word and a carry word with one row of
// full adders, so that  a + b + c = s + 2*cy  (mod 2^N).
// In the sign detector the operands are ~x1'', x2 and x3. The carry out of
// the top full adder has weight 2^N and is dropped (that is the "mod 2^N"),
// so cy keeps only N-1 bits: cy[i] is the carry out of bit i and has weight
// 2^(i+1).
//
// Purely combinational, one full-adder delay.
module csa_mod2n #(
  parameter int unsigned N = rns_sign_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-2:0] cy
);

  if (N < 2) begin : g_bad_n
    $error("csa_mod2n: N must be at least 2");
  end

  always_comb begin
    s = a ^ b ^ c;
    for (int unsigned i = 0; i < N - 1; i++) begin
      cy[i] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
    end
  end

endmodule
