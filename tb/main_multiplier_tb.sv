// main_multiplier_tb: self-checking test of the coefficient multiplier.
//
// First reproduces the two products of the design's reference simulation
// (operand 2 at address 0 gives X=2, Y=1, P=2; operand 7 at address 1 gives
// X=7, Y=2, P=14). Then keeps read high and changes the operand, address
// and precision after every result, including coefficient writes, and
// checks each product, x and y against a model memory kept here. The number
// of cycles between consecutive results is checked against
// 3 + max(1, min(popcount(coef), prec)).
module main_multiplier_tb;
  import simul_pkg::*;

  localparam int unsigned W = DATA_W;
  localparam int unsigned K_W = $clog2(W + 1);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic              clk = 1'b0, rst = 1'b1, read = 1'b0;
  logic [W-1:0]      b = '0;
  logic [ADDR_W-1:0] add0 = '0;
  logic [K_W-1:0]    prec = K_W'(W);
  logic              wr_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0;
  logic [W-1:0]      wr_data = '0;
  logic [W-1:0]      x, y;
  logic [2*W-1:0]    p;
  logic              p_valid, busy;
  logic [K_W-1:0]    terms;
  logic [W-1:0]      model [DEPTH];

  int unsigned checks = 0, failures = 0;

  main_multiplier dut (.*);

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

  // Wait for the next result; returns the number of cycles waited.
  task automatic wait_result(output int unsigned cyc);
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!p_valid);
  endtask

  initial begin
    int unsigned cyc, lat;
    logic [W-1:0] ab; logic [ADDR_W-1:0] aa; int unsigned pr;
    for (int unsigned a = 0; a < DEPTH; a++) model[a] = W'(a + 1);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Reference simulation values.
    b = 8'd2; add0 = 3'd0; read = 1'b1;
    wait_result(cyc);
    check("fig X", x, 2); check("fig Y", y, 1); check("fig P", p, 2);
    check("first latency (accept to p_valid)", cyc - 1, 2 + 1);
    b = 8'd7; add0 = 3'd1;
    wait_result(cyc);
    check("fig X", x, 7); check("fig Y", y, 2); check("fig P", p, 14);
    // Random operations with read held high.
    for (int it = 0; it < 3000; it++) begin
      if (it % 7 == 3) begin
        // Rewrite one coefficient while the unit is busy with nothing (read low).
        read = 1'b0;
        @(negedge clk);
        while (busy) @(negedge clk);
        wr_en = 1'b1; wr_addr = ADDR_W'($urandom); wr_data = W'($urandom);
        model[wr_addr] = wr_data;
        @(negedge clk);
        wr_en = 1'b0;
        read = 1'b1;
      end
      ab = W'($urandom); aa = ADDR_W'($urandom);
      pr = (it % 3 == 0) ? $urandom_range(0, W) : W;
      b = ab; add0 = aa; prec = K_W'(pr);
      wait_result(cyc);
      lat = n_terms(model[aa], pr); if (lat == 0) lat = 1;
      check($sformatf("P %0d*coef[%0d] prec %0d", ab, aa, pr), p, ref_prod(ab, model[aa], pr));
      check("X", x, ab);
      check("Y", y, model[aa]);
      check("terms", terms, n_terms(model[aa], pr));
      // Steady state: one idle cycle, one fetch cycle, lat multiply cycles,
      // one cycle to register the product.
      if (it % 7 != 3) check("cycles between results", cyc, 3 + lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
