// simul_top_tb: end-to-end test of the whole design at its default sizes.
//
// The neural accelerator and the FIR filter run at the same time, each
// driven by its own process:
//   - accelerator: first the reference run (fuzzy weights 1..4 at addresses
//     1..4, outputs stepping by 2, 6, 12, 20; ten results per neuron), then
//     random segments with coefficient writes, bias loads and reduced
//     precision; every result and activation is checked against a model.
//   - filter: an impulse, then a random sample stream with coefficient
//     writes and reduced precision, presented with in_valid held high
//     while the filter is busy (back-pressure); every output is checked
//     against a model FIR.
// Each mechanism of the design is counted and must occur at least once:
// exact products that skipped zero coefficient bits, products truncated by
// the precision limit, coefficient writes in both units, accumulator clear
// (loading a bias) and wrap-around, a negative sign activation, filter
// back-pressure, and both units busy in the same cycle.
module simul_top_tb;
  import simul_pkg::*;

  localparam int unsigned W = DATA_W;
  localparam int unsigned N = N_UNITS;
  localparam int unsigned T = N_UNITS;
  localparam int unsigned K_W = $clog2(W + 1);
  localparam int unsigned Y_W = 2 * W + $clog2(T);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic              clk = 1'b0, rst = 1'b1;
  logic              nn_en = 1'b0, nn_clr = 1'b0;
  logic [K_W-1:0]    nn_prec = K_W'(W);
  logic [W-1:0]      nn_fuzzy_weight [N];
  logic [ADDR_W-1:0] nn_address [N];
  logic [N-1:0]      nn_wr_en = '0;
  logic [ADDR_W-1:0] nn_wr_addr = '0;
  logic [W-1:0]      nn_wr_data = '0;
  logic [ACC_W-1:0]  nn_bias [N];
  logic [ACC_W-1:0]  nn_ann_out [N];
  logic [N-1:0]      nn_act;
  logic [N-1:0]      nn_out_valid;
  logic [K_W-1:0]    nn_terms [N];
  logic              fir_in_valid = 1'b0, fir_in_ready;
  logic [W-1:0]      fir_x_in = '0;
  logic [K_W-1:0]    fir_prec = K_W'(W);
  logic              fir_coef_we = 1'b0;
  logic [$clog2(T)-1:0] fir_coef_addr = '0;
  logic [W-1:0]      fir_coef_data = '0;
  logic [Y_W-1:0]    fir_y_out;
  logic              fir_out_valid;
  logic [K_W-1:0]    fir_max_terms;

  int unsigned checks = 0, failures = 0;
  // Mechanism counters.
  int unsigned n_skip = 0, n_trunc = 0, n_nn_write = 0, n_fir_write = 0;
  int unsigned n_clr = 0, n_wrap = 0, n_backpressure = 0, n_both_busy = 0;
  int unsigned n_nn_results = 0, n_fir_results = 0, n_neg_act = 0;
  bit nn_done = 0, fir_done = 0;

  simul_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned popcount(input logic [W-1:0] c);
    int unsigned n = 0;
    for (int i = 0; i < W; i++) if (c[i]) n++;
    return n;
  endfunction

  function automatic int unsigned ref_prod(input logic [W-1:0] av, input logic [W-1:0] c,
                                           input int unsigned pr);
    logic [W-1:0] kept = '0;
    int unsigned  n = 0;
    for (int i = W - 1; i >= 0; i--)
      if (c[i] && n < pr) begin kept[i] = 1'b1; n++; end
    return int'(av) * int'(kept);
  endfunction

  function automatic void check(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endfunction

  // Count a product's kind: exact with zero bits skipped, or truncated.
  function automatic void classify(input logic [W-1:0] c, input int unsigned pr);
    if (popcount(c) > pr) n_trunc++;
    else if (popcount(c) < W && c != '0) n_skip++;
  endfunction

  // ---------------- neural accelerator ----------------
  logic [W-1:0]     nn_model [N][DEPTH];
  logic [ACC_W-1:0] nn_acc [N];

  task automatic nn_step();
    @(negedge clk);
    for (int n = 0; n < N; n++)
      if (nn_out_valid[n]) begin
        logic [ACC_W:0] wide;
        logic [W-1:0]   c;
        c = nn_model[n][nn_address[n]];
        wide = {1'b0, nn_acc[n]} + (ACC_W+1)'(ref_prod(nn_fuzzy_weight[n], c, nn_prec));
        if (wide[ACC_W]) n_wrap++;
        nn_acc[n] = ACC_W'(wide);
        classify(c, nn_prec);
        check($sformatf("nn ann_out[%0d]", n), nn_ann_out[n], nn_acc[n]);
        check($sformatf("nn act[%0d]", n), nn_act[n], !nn_acc[n][ACC_W-1]);
        if (!nn_act[n]) n_neg_act++;
        check($sformatf("nn terms[%0d]", n), nn_terms[n],
              (popcount(c) < nn_prec) ? popcount(c) : nn_prec);
        n_nn_results++;
      end
  endtask

  task automatic nn_side();
    int unsigned seen [N];
    for (int n = 0; n < N; n++) begin
      for (int unsigned a = 0; a < DEPTH; a++) nn_model[n][a] = W'(a + 1);
      nn_acc[n] = '0; seen[n] = 0;
      nn_fuzzy_weight[n] = W'(n + 1);
      nn_address[n] = ADDR_W'(n + 1);
    end
    // Reference run: ten results per neuron, value k*(n+1)*(n+2).
    nn_en = 1'b1;
    while (seen[0] < 10 || seen[1] < 10 || seen[2] < 10 || seen[3] < 10) begin
      @(negedge clk);
      for (int n = 0; n < N; n++)
        if (nn_out_valid[n]) begin
          seen[n]++;
          nn_acc[n] = nn_acc[n] + ACC_W'((n + 1) * (n + 2));
          classify(nn_model[n][nn_address[n]], W);
          n_nn_results++;
          if (seen[n] <= 10)
            check($sformatf("reference ann_out[%0d] #%0d", n, seen[n]), nn_ann_out[n],
                  seen[n] * (n + 1) * (n + 2));
        end
    end
    nn_en = 1'b0;
    repeat (W + 4) nn_step();
    // Random segments.
    for (int s = 0; s < 120; s++) begin
      if (s % 10 == 9) begin
        for (int n = 0; n < N; n++) nn_bias[n] = ACC_W'($urandom);
        nn_clr = 1'b1; @(negedge clk); nn_clr = 1'b0;
        for (int n = 0; n < N; n++) begin
          nn_acc[n] = nn_bias[n];
          check("nn clr loads bias", nn_ann_out[n], nn_acc[n]);
        end
        n_clr++;
      end
      if (s % 3 == 1) begin
        nn_wr_en = N'($urandom) | N'(1); nn_wr_addr = ADDR_W'($urandom);
        nn_wr_data = W'($urandom);
        for (int n = 0; n < N; n++) if (nn_wr_en[n]) nn_model[n][nn_wr_addr] = nn_wr_data;
        @(negedge clk); nn_wr_en = '0;
        n_nn_write++;
      end
      for (int n = 0; n < N; n++) begin
        nn_fuzzy_weight[n] = W'($urandom);
        nn_address[n] = ADDR_W'($urandom);
      end
      nn_prec = K_W'((s % 2) ? $urandom_range(0, W - 1) : W);
      nn_en = 1'b1;
      repeat ($urandom_range(10, 60)) nn_step();
      nn_en = 1'b0;
      repeat (W + 4) nn_step();
    end
    nn_done = 1;
  endtask

  // ---------------- FIR filter ----------------
  logic [W-1:0] h [T];
  logic [W-1:0] xs [T];

  task automatic fir_send(input logic [W-1:0] xv, input int unsigned pr);
    int unsigned expy = 0;
    @(negedge clk);
    fir_in_valid = 1'b1; fir_x_in = xv; fir_prec = K_W'(pr);
    // Hold the request until it is taken (back-pressure while busy).
    while (!fir_in_ready) begin n_backpressure++; @(negedge clk); end
    for (int k = T - 1; k > 0; k--) xs[k] = xs[k-1];
    xs[0] = xv;
    for (int k = 0; k < T; k++) begin
      expy += ref_prod(xs[k], h[k], pr);
      classify(h[k], pr);
    end
    @(negedge clk);
    // Often offer a dummy sample at once; it must not be taken while busy
    // and is withdrawn when the output appears.
    fir_in_valid = $urandom_range(0, 1) == 1;
    fir_x_in = W'($urandom);
    // An offered sample is held off (in_ready low) until the output is out.
    while (!fir_out_valid) begin
      if (fir_in_valid && !fir_in_ready) n_backpressure++;
      @(negedge clk);
    end
    check($sformatf("fir y for x=%0d", xv), fir_y_out, expy);
    n_fir_results++;
    fir_in_valid = 1'b0;
  endtask

  task automatic fir_side();
    for (int k = 0; k < T; k++) begin h[k] = W'(k + 1); xs[k] = '0; end
    fir_send(8'd1, W); check("impulse 0", fir_y_out, 1);
    fir_send(8'd0, W); check("impulse 1", fir_y_out, 2);
    fir_send(8'd0, W); check("impulse 2", fir_y_out, 3);
    fir_send(8'd0, W); check("impulse 3", fir_y_out, 4);
    fir_send(8'd0, W); check("impulse 4", fir_y_out, 0);
    for (int i = 0; i < 1500; i++) begin
      if (i % 13 == 6) begin
        @(negedge clk);
        fir_coef_we = 1'b1; fir_coef_addr = $clog2(T)'($urandom); fir_coef_data = W'($urandom);
        h[fir_coef_addr] = fir_coef_data;
        @(negedge clk);
        fir_coef_we = 1'b0;
        n_fir_write++;
      end
      fir_send(W'($urandom), (i % 4 == 0) ? $urandom_range(0, W - 1) : W);
    end
    fir_done = 1;
  endtask

  // Both units computing in the same cycle.
  always @(posedge clk)
    if (nn_en && !fir_in_ready) n_both_busy++;

  initial begin
    for (int n = 0; n < N; n++) begin
      nn_fuzzy_weight[n] = '0; nn_address[n] = '0; nn_bias[n] = '0;
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    fork
      nn_side();
      fir_side();
    join
    $display("mechanisms: zero-skip=%0d truncated=%0d nn-writes=%0d fir-writes=%0d clr=%0d wrap=%0d negative-act=%0d backpressure=%0d both-busy=%0d nn-results=%0d fir-results=%0d",
             n_skip, n_trunc, n_nn_write, n_fir_write, n_clr, n_wrap, n_neg_act,
             n_backpressure, n_both_busy, n_nn_results, n_fir_results);
    check("zero bits skipped",     n_skip > 0,         1);
    check("precision truncation",  n_trunc > 0,        1);
    check("nn coefficient write",  n_nn_write > 0,     1);
    check("fir coefficient write", n_fir_write > 0,    1);
    check("accumulator clear",     n_clr > 0,          1);
    check("accumulator wrap",      n_wrap > 0,         1);
    check("negative activation",   n_neg_act > 0,      1);
    check("fir back-pressure",     n_backpressure > 0, 1);
    check("both units busy",       n_both_busy > 0,    1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
