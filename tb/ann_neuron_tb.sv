// ann_neuron_tb: self-checking test of one neuron (multiply-accumulate).
//
// Segment by segment, holds a weight, address and precision constant with
// en high for a number of operations, then drops en and lets the neuron
// drain before changing them. Every out_valid pulse must show the
// accumulator grown by the reference product of this segment; the first
// segment reproduces neuron 1 of the design's simulation (weight 1 at
// address 1: outputs 2, 4, 6, ...). Also checks the cycles between
// results, clr loading the bias, the sign activation, coefficient writes
// and wrap-around of the 16-bit sum.
module ann_neuron_tb;
  import simul_pkg::*;

  localparam int unsigned W = DATA_W;
  localparam int unsigned K_W = $clog2(W + 1);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic              clk = 1'b0, rst = 1'b1, en = 1'b0, clr = 1'b0;
  logic [W-1:0]      weight = '0;
  logic [ADDR_W-1:0] addr = '0;
  logic [K_W-1:0]    prec = K_W'(W);
  logic              wr_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0;
  logic [W-1:0]      wr_data = '0;
  logic [ACC_W-1:0]  bias = '0;
  logic [ACC_W-1:0]  ann_out;
  logic              act;
  logic              out_valid;
  logic [2*W-1:0]    product;
  logic [K_W-1:0]    terms;
  logic [W-1:0]      model [DEPTH];
  logic [ACC_W-1:0]  acc = '0;
  logic [ACC_W-1:0]  nth_value = '0;   // ann_out at the n-th result of a segment

  int unsigned checks = 0, failures = 0, wraps = 0, n_neg = 0;

  ann_neuron dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned n_terms(input logic [W-1:0] c, input int unsigned pr);
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

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Run n operations with the given inputs, then drain.
  task automatic segment(input logic [W-1:0] w, input logic [ADDR_W-1:0] a,
                         input int unsigned pr, input int unsigned n);
    int unsigned seen = 0, cyc = 0, last_cyc = 0, lat;
    logic [2*W-1:0] pp;
    weight = w; addr = a; prec = K_W'(pr);
    pp  = ref_prod(w, model[a], pr);
    lat = n_terms(model[a], pr); if (lat == 0) lat = 1;
    en = 1'b1;
    while (seen < n) begin
      @(negedge clk); cyc++;
      if (out_valid) begin
        logic [ACC_W:0] wide;
        wide = {1'b0, acc} + (ACC_W+1)'(pp);
        if (wide[ACC_W]) wraps++;
        acc = ACC_W'(wide);
        check("ann_out", ann_out, acc);
        check("act", act, !acc[ACC_W-1]);
        if (!act) n_neg++;
        if (seen > 0) check("cycles between results", cyc - last_cyc, 3 + lat);
        last_cyc = cyc;
        seen++;
        if (seen == n) nth_value = ann_out;
      end
    end
    en = 1'b0;
    repeat (W + 4) begin
      @(negedge clk);
      if (out_valid) begin acc = acc + ACC_W'(pp); check("drain", ann_out, acc); end
    end
    check("idle holds", ann_out, acc);
  endtask

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) model[a] = W'(a + 1);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check("reset", ann_out, 0);
    // Neuron 1 of the reference simulation: 2, 4, ..., 20.
    segment(8'd1, 3'd1, W, 10);
    check("reference after 10", nth_value, 20);
    // clr empties the accumulator.
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0; acc = '0;
    check("clr", ann_out, 0);
    // clr loads the bias w0; a negative bias gives act = 0 (-1).
    @(negedge clk); bias = 16'hFF00; clr = 1'b1; @(negedge clk); clr = 1'b0; acc = bias;
    check("clr loads bias", ann_out, acc);
    check("act of negative bias", act, 0);
    // Random segments, with writes, reduced precision and random biases.
    for (int s = 0; s < 200; s++) begin
      if (s % 6 == 2) begin
        bias = ACC_W'($urandom);
        clr = 1'b1; @(negedge clk); clr = 1'b0; acc = bias;
        check("clr loads bias", ann_out, acc);
        check("act after clr", act, !acc[ACC_W-1]);
      end
      if (s % 5 == 4) begin
        wr_en = 1'b1; wr_addr = ADDR_W'($urandom); wr_data = W'($urandom);
        model[wr_addr] = wr_data;
        @(negedge clk); wr_en = 1'b0;
      end
      segment(W'($urandom), ADDR_W'($urandom), (s % 2) ? $urandom_range(0, W) : W,
              $urandom_range(1, 8));
    end
    check("accumulator wrapped at least once", (wraps > 0) ? 1 : 0, 1);
    check("negative activation seen", (n_neg > 0) ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
