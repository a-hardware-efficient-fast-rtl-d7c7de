// tb_rns_sign_detect_small: exhaustive end-to-end test of the sign detector
// at small word sizes.
//
// Every number of the dynamic range is checked for N = 3 (M = 840),
// N = 4 (M = 7440), N = 5 (M = 62496) and N = 6 (M = 512064), one number per
// cycle with a fixed two-cycle latency (see rns_sign_exhaust). This covers
// every residue combination, including all the cases of the correction bit,
// for sizes where N-1 is 2, 3, 4 and 5 (so the carry trees are both padded
// and unpadded).
module tb_rns_sign_detect_small;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic done3, done4, done5, done6;
  int c3, c4, c5, c6, f3, f4, f5, f6;
  int checks, failures;

  always #5 clk = ~clk;

  rns_sign_exhaust #(.N(3)) u3 (.clk(clk), .rst_n(rst_n), .start(start), .done(done3), .checks(c3), .failures(f3));
  rns_sign_exhaust #(.N(4)) u4 (.clk(clk), .rst_n(rst_n), .start(start), .done(done4), .checks(c4), .failures(f4));
  rns_sign_exhaust #(.N(5)) u5 (.clk(clk), .rst_n(rst_n), .start(start), .done(done5), .checks(c5), .failures(f5));
  rns_sign_exhaust #(.N(6)) u6 (.clk(clk), .rst_n(rst_n), .start(start), .done(done6), .checks(c6), .failures(f6));

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c4 + c5 + c6, f3 + f4 + f5 + f6 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start = 1'b1;
    wait (done3 && done4 && done5 && done6);
    checks   = c3 + c4 + c5 + c6;
    failures = f3 + f4 + f5 + f6;
    // every number of each range must have been checked
    checks += 4;
    if (c3 != 840)    failures++;
    if (c4 != 7440)   failures++;
    if (c5 != 62496)  failures++;
    if (c6 != 512064) failures++;
    $display("  N=3: %0d numbers, N=4: %0d, N=5: %0d, N=6: %0d", c3, c4, c5, c6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
