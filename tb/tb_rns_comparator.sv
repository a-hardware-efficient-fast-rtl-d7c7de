// tb_rns_comparator: self-checking test of the N-bit comparator.
//
// The default N = 16 comparator gets equal pairs, pairs that differ in one
// bit at every position, and random pairs; a N = 6 comparator is checked
// over all 4096 input pairs. Reference: the simulator's own > and ==.
module tb_rns_comparator;

  int checks = 0;
  int failures = 0;

  logic [15:0] a, b;  logic gt, eq;
  logic [5:0]  a6, b6; logic gt6, eq6;

  rns_comparator dut (.a(a), .b(b), .gt(gt), .eq(eq));
  rns_comparator #(.N(6)) dut6 (.a(a6), .b(b6), .gt(gt6), .eq(eq6));

  task automatic check16(input logic [15:0] ai, input logic [15:0] bi);
    a = ai; b = bi;
    #1;
    checks++;
    if (gt !== (ai > bi) || eq !== (ai == bi)) begin
      failures++;
      $display("FAIL a=%h b=%h gt=%b eq=%b", ai, bi, gt, eq);
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
    for (int i = 0; i < 16; i++) begin
      r = 16'($urandom);
      check16(r, r);
      check16(r | (16'h1 << i), r & ~(16'h1 << i));
      check16(r & ~(16'h1 << i), r | (16'h1 << i));
    end
    check16(16'hFFFF, 16'h0000);
    check16(16'h0000, 16'hFFFF);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom));
    for (int v = 0; v < 4096; v++) begin
      a6 = v[5:0]; b6 = v[11:6];
      #1;
      checks++;
      if (gt6 !== (a6 > b6) || eq6 !== (a6 == b6)) begin
        failures++;
        $display("FAIL N=6 a=%h b=%h gt=%b eq=%b", a6, b6, gt6, eq6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
