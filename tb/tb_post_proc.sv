// tb_post_proc: exhaustive self-checking test of the post-processing unit.
//
// All 32 input combinations. The reference computes W from its definition
// and the sign as bit n-1 of a two-bit model of the addition: the top bit's
// half sum plus the carry into it, where the carry is G, or P with W as the
// carry into bit 0.
module tb_post_proc;

  int checks = 0;
  int failures = 0;

  logic p_msb, g_low, p_low, gt, eq_and, w, sign;

  post_proc dut (.p_msb(p_msb), .g_low(g_low), .p_low(p_low), .gt(gt),
                 .eq_and(eq_and), .w(w), .sign(sign));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int e_w, carry, e_sign;
      {p_msb, g_low, p_low, gt, eq_and} = v[4:0];
      #1;
      e_w    = (gt || eq_and) ? 1 : 0;
      carry  = g_low ? 1 : (p_low ? e_w : 0);
      e_sign = (int'(p_msb) + carry) % 2;
      checks += 2;
      if (w !== e_w[0])       begin failures++; $display("FAIL w v=%b", v[4:0]); end
      if (sign !== e_sign[0]) begin failures++; $display("FAIL sign v=%b", v[4:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
