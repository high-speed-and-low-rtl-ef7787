// coef_mem_tb: self-checking test of the coefficient memory.
//
// Checks the power-up table (word a holds a + 1), the one-cycle read
// latency, that rd_data holds while rd_en is low, writes to random
// addresses against a model array kept here, and that a read of the
// address being written returns the old word.
module coef_mem_tb;
  import simul_pkg::*;

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic              clk = 1'b0;
  logic              rd_en = 1'b0, wr_en = 1'b0;
  logic [ADDR_W-1:0] rd_addr = '0, wr_addr = '0;
  logic [DATA_W-1:0] rd_data, wr_data = '0;
  logic [DATA_W-1:0] model [DEPTH];

  int unsigned checks = 0, failures = 0;

  coef_mem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [DATA_W-1:0] got, input logic [DATA_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic read_at(input logic [ADDR_W-1:0] ad);
    @(negedge clk);
    rd_en = 1'b1; rd_addr = ad;
    @(negedge clk);
    rd_en = 1'b0;
    check($sformatf("read %0d", ad), rd_data, model[ad]);
  endtask

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) model[a] = DATA_W'(a + 1);
    // Power-up contents.
    for (int unsigned a = 0; a < DEPTH; a++) read_at(ADDR_W'(a));
    // Output holds while rd_en is low.
    read_at(ADDR_W'(2));
    rd_addr = ADDR_W'(5);
    repeat (3) @(negedge clk);
    check("hold", rd_data, model[2]);
    // Random writes and reads.
    repeat (2000) begin
      @(negedge clk);
      if ($urandom_range(0, 1) == 1) begin
        wr_en = 1'b1; wr_addr = ADDR_W'($urandom); wr_data = DATA_W'($urandom);
        model[wr_addr] = wr_data;
        @(negedge clk);
        wr_en = 1'b0;
      end
      read_at(ADDR_W'($urandom));
    end
    // Read during write of the same address returns the old word.
    @(negedge clk);
    wr_en = 1'b1; wr_addr = ADDR_W'(3); wr_data = ~model[3];
    rd_en = 1'b1; rd_addr = ADDR_W'(3);
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0;
    check("read during write", rd_data, model[3]);
    model[3] = ~model[3];
    read_at(ADDR_W'(3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
