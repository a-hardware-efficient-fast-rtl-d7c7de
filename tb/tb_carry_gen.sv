// tb_carry_gen: self-checking test of the carry generation unit.
//
// For random sum/carry words (N = 16) and exhaustively for N = 4 it checks
// against integer arithmetic on S + 2C:
//   p_msb = s[N-1] xor (2C)[N-1]
//   g_low = carry out of the N-1 low bits of S + 2C
//   p_low = the N-1 low bits of S xor 2C are all ones
module tb_carry_gen;

  int checks = 0;
  int failures = 0;

  logic [15:0] s;  logic [14:0] cy;  logic pm, gl, pl;
  logic [3:0]  s4; logic [2:0]  cy4; logic pm4, gl4, pl4;

  carry_gen dut (.s(s), .cy(cy), .p_msb(pm), .g_low(gl), .p_low(pl));
  carry_gen #(.N(4)) dut4 (.s(s4), .cy(cy4), .p_msb(pm4), .g_low(gl4), .p_low(pl4));

  task automatic check16(input logic [15:0] si, input logic [14:0] ci);
    logic [31:0] two_c, lo_sum;
    logic e_pm, e_gl, e_pl;
    s = si; cy = ci;
    #1;
    two_c  = 32'(ci) << 1;
    lo_sum = (32'(si) & 32'h7FFF) + (two_c & 32'h7FFF);
    e_gl   = lo_sum[15];
    e_pl   = ((32'(si) ^ two_c) & 32'h7FFF) == 32'h7FFF;
    e_pm   = si[15] ^ two_c[15];
    checks++;
    if ({pm, gl, pl} !== {e_pm, e_gl, e_pl}) begin
      failures++;
      $display("FAIL s=%h cy=%h got %b%b%b exp %b%b%b", si, ci, pm, gl, pl, e_pm, e_gl, e_pl);
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
    logic [15:0] r;
    // all-propagate low part, with and without a generate at the bottom
    for (int i = 0; i < 16; i++) begin
      r = 16'($urandom);
      check16(r, ~r[15:1] & 15'h7FFF);          // s ^ 2c = ...1110 pattern
      check16(r | 16'h1, (~r[14:0]) & 15'h7FFE);
    end
    check16(16'h7FFF, 15'h0000);
    check16(16'hFFFF, 15'h7FFF);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 15'($urandom));
    for (int v = 0; v < 128; v++) begin
      logic [4:0] t;
      s4 = v[3:0]; cy4 = v[6:4];
      #1;
      t = 5'(s4[2:0]) + 5'({cy4[1:0], 1'b0});
      checks++;
      if ({pm4, gl4, pl4} !== {s4[3] ^ cy4[2], t[3], (s4[2:0] ^ {cy4[1:0], 1'b0}) == 3'b111}) begin
        failures++;
        $display("FAIL N=4 s=%h cy=%h", s4, cy4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
