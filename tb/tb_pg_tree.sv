// tb_pg_tree: self-checking test of the group generate/propagate tree.
//
// Three trees are checked: W = 16 (the default, a power of two), W = 15
// (the carry tree of the n = 16 detector, padded) and W = 5. The reference
// walks the bits from least to most significant with G = g_i | p_i & G and
// P = p_i & P, which is the serial form of the same prefix operator.
// Patterns: all-propagate fields, single-generate fields, and random ones
// with a bias toward long propagate runs.
module tb_pg_tree;

  int checks = 0;
  int failures = 0;

  logic [15:0] g16, p16;  logic gg16, pp16;
  logic [14:0] g15, p15;  logic gg15, pp15;
  logic [4:0]  g5,  p5;   logic gg5,  pp5;

  pg_tree #(.W(16)) dut16 (.g(g16), .pr(p16), .g_grp(gg16), .p_grp(pp16));
  pg_tree #(.W(15)) dut15 (.g(g15), .pr(p15), .g_grp(gg15), .p_grp(pp15));
  pg_tree #(.W(5))  dut5  (.g(g5),  .pr(p5),  .g_grp(gg5),  .p_grp(pp5));

  function automatic logic [1:0] ref_pg(input logic [15:0] g, input logic [15:0] p, input int w);
    logic G = 1'b0, P = 1'b1;
    for (int i = 0; i < w; i++) begin
      G = g[i] | (p[i] & G);
      P = p[i] & P;
    end
    return {G, P};
  endfunction

  task automatic apply(input logic [15:0] g, input logic [15:0] p);
    logic [1:0] e16, e15, e5;
    g16 = g;        p16 = p;
    g15 = g[14:0];  p15 = p[14:0];
    g5  = g[4:0];   p5  = p[4:0];
    #1;
    e16 = ref_pg(g, p, 16);
    e15 = ref_pg(g, p, 15);
    e5  = ref_pg(g, p, 5);
    checks += 3;
    if ({gg16, pp16} !== e16) begin failures++; $display("FAIL W=16 g=%h p=%h got %b exp %b", g, p, {gg16, pp16}, e16); end
    if ({gg15, pp15} !== e15) begin failures++; $display("FAIL W=15 g=%h p=%h got %b exp %b", g, p, {gg15, pp15}, e15); end
    if ({gg5, pp5}   !== e5)  begin failures++; $display("FAIL W=5 g=%h p=%h got %b exp %b",  g, p, {gg5, pp5}, e5);  end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] g, p;
    apply(16'h0000, 16'hFFFF);
    apply(16'h0000, 16'h0000);
    for (int i = 0; i < 16; i++) begin
      apply(16'h1 << i, 16'hFFFF & ~(16'h1 << i));   // one generate, rest propagate
      apply(16'h1 << i, (16'hFFFF << (i + 1)));      // propagate above it only
      apply(16'h1 << i, (16'hFFFF << (i + 2)));      // a gap right above it
    end
    // exhaustive over the 5-bit tree
    for (int v = 0; v < 1024; v++) apply({11'h0, v[4:0]}, {11'h7FF, v[9:5]});
    for (int n = 0; n < 20000; n++) begin
      g = 16'($urandom) & 16'($urandom) & 16'($urandom);
      p = 16'($urandom) | 16'($urandom);
      p = p & ~g;
      apply(g, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
