// coef_mem: coefficient memory of the shift-and-add multiplier.
//
// Holds DEPTH = 2**ADDR_W coefficients of DATA_W bits. A read is requested by
// asserting rd_en with rd_addr; the word appears on rd_data on the next clock
// edge (one cycle read latency, the way an FPGA block or distributed RAM with
// an output register behaves) and stays there until the next read. A write
// port (wr_en, wr_addr, wr_data) lets the coefficients be replaced; a write
// and a read of the same address in one cycle return the old word.
//
// The memory itself and its role (it feeds the multiplier's shift register)
// come from the design; the read latency, the write port and the power-up
// contents are choices of this implementation. The power-up contents are
// word a = a + 1, which matches the coefficients observed in the reference
// simulations (address 0 holds 1, address 1 holds 2, ...). The contents are
// set by an initial block, as FPGA memories are; reset does not touch them,
// and rd_data is undefined until the first read.
module coef_mem
  import simul_pkg::*;
#(
  parameter int unsigned ADDR_W_P = simul_pkg::ADDR_W,
  parameter int unsigned DATA_W_P = simul_pkg::DATA_W
) (
  input  logic                clk,
  input  logic                rd_en,
  input  logic [ADDR_W_P-1:0] rd_addr,
  output logic [DATA_W_P-1:0] rd_data,
  input  logic                wr_en,
  input  logic [ADDR_W_P-1:0] wr_addr,
  input  logic [DATA_W_P-1:0] wr_data
);

  localparam int unsigned DEPTH = 2 ** ADDR_W_P;

  logic [DATA_W_P-1:0] mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) mem[a] = DATA_W_P'(a + 1);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
