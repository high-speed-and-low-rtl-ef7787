// simul_mult_tb: self-checking test of the shift-and-add multiplier.
//
// Runs every 8-bit a x coef pair at full precision, then random pairs at
// random precision limits, and back-to-back starts issued in the done
// cycle. Each result is compared with a reference computed here: a times
// the coefficient with all but its prec most significant set bits cleared.
// The cycle count from start to done is checked against
// max(1, min(popcount(coef), prec)), and the reported term count against
// min(popcount(coef), prec).
module simul_mult_tb;
  import simul_pkg::*;

  localparam int unsigned W = DATA_W;
  localparam int unsigned K_W = $clog2(W + 1);

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic             start = 1'b0;
  logic [W-1:0]     a = '0, coef = '0;
  logic [K_W-1:0]   prec = '0;
  logic             busy, done;
  logic [2*W-1:0]   p;
  logic [K_W-1:0]   terms;

  int unsigned checks = 0, failures = 0;

  simul_mult dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ref_terms(input logic [W-1:0] c, input int unsigned pr);
    int unsigned n = 0;
    for (int i = 0; i < W; i++) if (c[i]) n++;
    return (n < pr) ? n : pr;
  endfunction

  function automatic logic [2*W-1:0] ref_prod(input logic [W-1:0] av, input logic [W-1:0] c,
                                              input int unsigned pr);
    logic [W-1:0] kept = '0;
    int unsigned  n = 0;
    for (int i = W - 1; i >= 0; i--)
      if (c[i] && n < pr) begin kept[i] = 1'b1; n++; end
    return (2*W)'(av) * (2*W)'(kept);
  endfunction

  task automatic check(input string what, input logic [2*W-1:0] got, input logic [2*W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_one(input logic [W-1:0] av, input logic [W-1:0] cv, input int unsigned pr);
    int unsigned cyc = 0, lat;
    @(negedge clk);
    a = av; coef = cv; prec = K_W'(pr); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin @(negedge clk); cyc++; end
    lat = ref_terms(cv, pr);
    if (lat == 0) lat = 1;
    check($sformatf("%0d*%0d prec %0d", av, cv, pr), p, ref_prod(av, cv, pr));
    check("latency", (2*W)'(cyc), (2*W)'(lat));
    check("terms", (2*W)'(terms), (2*W)'(ref_terms(cv, pr)));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Exhaustive at full precision.
    for (int unsigned i = 0; i < 2**W; i++)
      for (int unsigned j = 0; j < 2**W; j++)
        run_one(W'(i), W'(j), W);
    // Random at reduced precision (0 .. W).
    repeat (5000) run_one(W'($urandom), W'($urandom), $urandom_range(0, W));
    // Back-to-back: a new start in the cycle done is high.
    begin
      logic [W-1:0] a1, c1, a2, c2;
      a1 = 8'd200; c1 = 8'b1010_0001; a2 = 8'd13; c2 = 8'b0111_1111;
      @(negedge clk);
      a = a1; coef = c1; prec = K_W'(W); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      check("b2b first", p, (2*W)'(a1) * (2*W)'(c1));
      a = a2; coef = c2; start = 1'b1;           // start while done is high
      @(negedge clk);
      start = 1'b0;
      check("b2b accepted", (2*W)'(busy), 1);
      while (!done) @(negedge clk);
      check("b2b second", p, (2*W)'(a2) * (2*W)'(c2));
    end
    // Reset in the middle of a product clears the unit.
    @(negedge clk);
    a = 8'hff; coef = 8'hff; prec = K_W'(W); start = 1'b1;
    @(negedge clk); start = 1'b0;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    check("reset busy", (2*W)'(busy), 0);
    check("reset p", p, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
