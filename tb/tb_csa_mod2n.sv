// tb_csa_mod2n: self-checking test of the carry-save adder modulo 2^N.
//
// Checks, for the default N = 16 and for N = 4 (exhaustively), that
//   s + 2*cy == a + b + c  (mod 2^N)
// and that s is the bitwise parity and cy[i] the majority of bit i, i.e.
// that the carry word is a real carry-save form and not just any pair of
// words with the right sum.
module tb_csa_mod2n;

  int checks = 0;
  int failures = 0;

  logic [15:0] a, b, c, s;
  logic [14:0] cy;
  logic [3:0]  a4, b4, c4, s4;
  logic [2:0]  cy4;

  csa_mod2n dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));
  csa_mod2n #(.N(4)) dut4 (.a(a4), .b(b4), .c(c4), .s(s4), .cy(cy4));

  task automatic check16(input logic [15:0] ai, input logic [15:0] bi, input logic [15:0] ci);
    logic [31:0] sum_ref, sum_got;
    logic ok;
    a = ai; b = bi; c = ci;
    #1;
    sum_ref = (32'(ai) + 32'(bi) + 32'(ci)) & 32'hFFFF;
    sum_got = (32'(s) + (32'(cy) << 1)) & 32'hFFFF;
    ok = (sum_ref == sum_got);
    for (int i = 0; i < 15; i++)
      if (cy[i] !== ((ai[i] + bi[i] + ci[i]) >= 2)) ok = 1'b0;
    for (int i = 0; i < 16; i++)
      if (s[i] !== ((ai[i] + bi[i] + ci[i]) % 2 == 1)) ok = 1'b0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=16 a=%h b=%h c=%h s=%h cy=%h", ai, bi, ci, s, cy);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16(16'hFFFF, 16'hFFFF, 16'hFFFF);
    check16(16'h0000, 16'h0000, 16'h0000);
    check16(16'h8000, 16'h8000, 16'h8000);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom), 16'($urandom));
    for (int v = 0; v < 4096; v++) begin
      a4 = v[3:0]; b4 = v[7:4]; c4 = v[11:8];
      #1;
      checks++;
      if (((5'(s4) + (5'(cy4) << 1)) & 5'hF) != ((5'(a4) + 5'(b4) + 5'(c4)) & 5'hF)) begin
        failures++;
        $display("FAIL N=4 a=%h b=%h c=%h s=%h cy=%h", a4, b4, c4, s4, cy4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
