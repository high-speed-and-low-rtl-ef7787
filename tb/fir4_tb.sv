// fir4_tb: self-checking test of the four-tap FIR filter.
//
// Feeds a stream of random 8-bit samples with random idle gaps, rewrites
// coefficients between samples and varies the precision limit. Every output
// is compared with y[n] = sum_k h'[k] * x[n-k] computed here from a model
// delay line (h' is h[k] with all but its prec most significant set bits
// cleared); the cycles from acceptance to out_valid are checked against
// 1 + max_k max(1, min(popcount(h[k]), prec)), and in_ready must be low
// while a sample is in flight. Starts with an impulse to check the default
// coefficients 1, 2, 3, 4.
module fir4_tb;
  import simul_pkg::*;

  localparam int unsigned W = DATA_W;
  localparam int unsigned T = N_UNITS;
  localparam int unsigned K_W = $clog2(W + 1);
  localparam int unsigned Y_W = 2 * W + $clog2(T);

  logic           clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic           in_ready;
  logic [W-1:0]   x_in = '0;
  logic [K_W-1:0] prec = K_W'(W);
  logic           coef_we = 1'b0;
  logic [$clog2(T)-1:0] coef_addr = '0;
  logic [W-1:0]   coef_data = '0;
  logic [Y_W-1:0] y_out;
  logic           out_valid;
  logic [K_W-1:0] max_terms;

  logic [W-1:0]   h [T];
  logic [W-1:0]   xs [T];

  int unsigned checks = 0, failures = 0;

  fir4 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned n_terms(input logic [W-1:0] c, input int unsigned pr);
    int unsigned n = 0;
    for (int i = 0; i < W; i++) if (c[i]) n++;
    return (n < pr) ? n : pr;
  endfunction

  function automatic int unsigned ref_prod(input logic [W-1:0] av, input logic [W-1:0] c,
                                           input int unsigned pr);
    logic [W-1:0] kept = '0;
    int unsigned  n = 0;
    for (int i = W - 1; i >= 0; i--)
      if (c[i] && n < pr) begin kept[i] = 1'b1; n++; end
    return int'(av) * int'(kept);
  endfunction

  task automatic check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic send(input logic [W-1:0] xv, input int unsigned pr);
    int unsigned expy = 0, lat = 0, cyc = 0, l;
    @(negedge clk);
    check("ready when idle", in_ready, 1);
    in_valid = 1'b1; x_in = xv; prec = K_W'(pr);
    for (int k = T - 1; k > 0; k--) xs[k] = xs[k-1];
    xs[0] = xv;
    for (int k = 0; k < T; k++) begin
      expy += ref_prod(xs[k], h[k], pr);
      l = n_terms(h[k], pr); if (l == 0) l = 1;
      if (l > lat) lat = l;
    end
    @(negedge clk);
    in_valid = 1'b0;
    cyc = 1;
    while (!out_valid) begin
      checks++; if (in_ready) begin failures++; $display("FAIL ready while busy"); end
      @(negedge clk); cyc++;
    end
    check($sformatf("y for x=%0d prec %0d", xv, pr), y_out, expy);
    check("latency (accept to out_valid)", cyc - 1, lat + 1);
  endtask

  initial begin
    for (int k = 0; k < T; k++) begin h[k] = W'(k + 1); xs[k] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Impulse response with the power-up coefficients: 1, 2, 3, 4, 0.
    send(8'd1, W); check("impulse 0", y_out, 1);
    send(8'd0, W); check("impulse 1", y_out, 2);
    send(8'd0, W); check("impulse 2", y_out, 3);
    send(8'd0, W); check("impulse 3", y_out, 4);
    send(8'd0, W); check("impulse 4", y_out, 0);
    // Random stream.
    for (int i = 0; i < 3000; i++) begin
      if (i % 11 == 5) begin
        @(negedge clk);
        coef_we = 1'b1; coef_addr = $clog2(T)'($urandom); coef_data = W'($urandom);
        h[coef_addr] = coef_data;
        @(negedge clk);
        coef_we = 1'b0;
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
      send(W'($urandom), (i % 4 == 0) ? $urandom_range(0, W) : W);
    end
    // Largest possible output: all ones.
    for (int k = 0; k < T; k++) begin
      @(negedge clk); coef_we = 1'b1; coef_addr = $clog2(T)'(k); coef_data = '1; h[k] = '1;
    end
    @(negedge clk); coef_we = 1'b0;
    repeat (T) send('1, W);
    check("full-scale output", y_out, T * 255 * 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
