// nn_accelerator_tb: self-checking test of the four-neuron accelerator.
//
// Reproduces the design's accelerator simulation: fuzzy weights 1, 2, 3, 4
// at addresses 1, 2, 3, 4 with the power-up coefficients give outputs that
// step by 2, 6, 12 and 20; the first ten values of every neuron are
// checked. Then runs random segments (per-neuron weights and addresses,
// masked coefficient writes, reduced precision) and checks every out_valid
// against a per-neuron model, and that a write reaches only the neurons
// selected by wr_en.
module nn_accelerator_tb;
  import simul_pkg::*;

  localparam int unsigned W = DATA_W;
  localparam int unsigned N = N_UNITS;
  localparam int unsigned K_W = $clog2(W + 1);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic              clk = 1'b0, rst = 1'b1, en = 1'b0, clr = 1'b0;
  logic [K_W-1:0]    prec = K_W'(W);
  logic [W-1:0]      fuzzy_weight [N];
  logic [ADDR_W-1:0] address [N];
  logic [N-1:0]      wr_en = '0;
  logic [ADDR_W-1:0] wr_addr = '0;
  logic [W-1:0]      wr_data = '0;
  logic [ACC_W-1:0]  bias [N];
  logic [ACC_W-1:0]  ann_out [N];
  logic [N-1:0]      act;
  logic [N-1:0]      out_valid;
  logic [K_W-1:0]    terms [N];

  logic [W-1:0]      model [N][DEPTH];
  logic [ACC_W-1:0]  acc [N];
  int unsigned       count [N];

  int unsigned checks = 0, failures = 0;

  nn_accelerator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // One clock: account for every neuron that produced a result.
  task automatic step();
    @(negedge clk);
    for (int n = 0; n < N; n++)
      if (out_valid[n]) begin
        acc[n] = acc[n] + ACC_W'(ref_prod(fuzzy_weight[n], model[n][address[n]], prec));
        count[n]++;
        check($sformatf("ann_out[%0d]", n), ann_out[n], acc[n]);
        check($sformatf("act[%0d]", n), act[n], !acc[n][ACC_W-1]);
      end
  endtask

  task automatic drain();
    en = 1'b0;
    repeat (W + 4) step();
  endtask

  initial begin
    int unsigned ref_seen [N];
    for (int n = 0; n < N; n++) begin
      for (int unsigned a = 0; a < DEPTH; a++) model[n][a] = W'(a + 1);
      acc[n] = '0; count[n] = 0; ref_seen[n] = 0;
      fuzzy_weight[n] = W'(n + 1);
      bias[n] = '0;
      address[n] = ADDR_W'(n + 1);
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Reference run.
    en = 1'b1;
    while (ref_seen[0] < 10 || ref_seen[1] < 10 || ref_seen[2] < 10 || ref_seen[3] < 10) begin
      @(negedge clk);
      for (int n = 0; n < N; n++)
        if (out_valid[n]) begin
          ref_seen[n]++;
          acc[n] = acc[n] + ACC_W'((n + 1) * (n + 2));
          if (ref_seen[n] <= 10)
            check($sformatf("reference ann_out[%0d] #%0d", n, ref_seen[n]), ann_out[n],
                  ref_seen[n] * (n + 1) * (n + 2));
        end
    end
    check("reference final 1", acc[0] >= 20 ? 1 : 0, 1);
    en = 1'b0;
    repeat (W + 4) @(negedge clk);
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    for (int n = 0; n < N; n++) begin acc[n] = '0; check("clr", ann_out[n], 0); end
    // Random segments.
    for (int s = 0; s < 150; s++) begin
      if (s % 5 == 0) begin
        for (int n = 0; n < N; n++) bias[n] = ACC_W'($urandom);
        clr = 1'b1; @(negedge clk); clr = 1'b0;
        for (int n = 0; n < N; n++) begin
          acc[n] = bias[n];
          check("clr loads bias", ann_out[n], acc[n]);
        end
      end
      if (s % 3 == 1) begin
        wr_en = N'($urandom); wr_addr = ADDR_W'($urandom); wr_data = W'($urandom);
        for (int n = 0; n < N; n++) if (wr_en[n]) model[n][wr_addr] = wr_data;
        @(negedge clk); wr_en = '0;
      end
      for (int n = 0; n < N; n++) begin
        fuzzy_weight[n] = W'($urandom);
        address[n] = ADDR_W'($urandom);
      end
      prec = K_W'((s % 2) ? $urandom_range(0, W) : W);
      en = 1'b1;
      repeat ($urandom_range(5, 40)) step();
      drain();
    end
    for (int n = 0; n < N; n++) check($sformatf("neuron %0d produced results", n),
                                      count[n] > 100 ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
