// ann_neuron: one neuron of the accelerator, a multiply-accumulate unit
// built on the shift-and-add coefficient multiplier.
//
// Computes g = f(sum_i x_i * w_i + w0): each operation multiplies the
// neuron's input x_i (the fuzzy weight) by the coefficient w_i stored at
// addr and adds the product into the accumulator ann_out; clr loads the
// accumulator with the bias w0 to begin a new sum. act is the sign
// activation f of the running sum. The multiplier's input register serves
// as the neuron's input buffer and ann_out as its output register.
//
// Interface and timing: while en is high the neuron repeats operations back
// to back, each sampling weight and addr when it begins; results are
// 3 + max(1, min(popcount(coef), prec)) cycles apart (see main_multiplier).
// out_valid is high for one cycle, together with the ann_out value that has
// just taken a new product. clr is synchronous and cancels nothing else; a
// product completing in the same cycle as clr is dropped. The accumulator
// is ACC_W bits, read as two's complement, and wraps modulo 2**ACC_W. act
// is combinational from ann_out: 1 (for +1) while ann_out >= 0, 0 (for -1)
// while it is negative. Reset (rst) is active high and asynchronous and
// clears the accumulator to zero.
//
// The neuron function with its sign activation, the multiply-then-
// accumulate structure and the 16-bit accumulator follow the design's
// neuron description and its simulation (which shows the raw sums, here
// ann_out). Loading w0 through clr, the two's complement reading of the
// sum, wrap-around on overflow and the timing are this implementation's
// choices.
module ann_neuron
  import simul_pkg::*;
#(
  parameter int unsigned DATA_W_P = simul_pkg::DATA_W,
  parameter int unsigned ADDR_W_P = simul_pkg::ADDR_W,
  parameter int unsigned ACC_W_P  = simul_pkg::ACC_W,
  localparam int unsigned P_W = 2 * DATA_W_P,
  localparam int unsigned K_W = $clog2(DATA_W_P + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                clr,
  input  logic [DATA_W_P-1:0] weight,
  input  logic [ADDR_W_P-1:0] addr,
  input  logic [K_W-1:0]      prec,
  input  logic                wr_en,
  input  logic [ADDR_W_P-1:0] wr_addr,
  input  logic [DATA_W_P-1:0] wr_data,
  input  logic [ACC_W_P-1:0]  bias,
  output logic [ACC_W_P-1:0]  ann_out,
  output logic                act,
  output logic                out_valid,
  output logic [P_W-1:0]      product,
  output logic [K_W-1:0]      terms
);

  logic                p_valid, mul_busy;
  logic [DATA_W_P-1:0] x, y;

  main_multiplier #(.DATA_W_P(DATA_W_P), .ADDR_W_P(ADDR_W_P)) mm (
    .clk     (clk),
    .rst   (rst),
    .read    (en),
    .b       (weight),
    .add0    (addr),
    .prec    (prec),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .x       (x),
    .y       (y),
    .p       (product),
    .p_valid (p_valid),
    .terms   (terms),
    .busy    (mul_busy)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ann_out   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (clr) begin
        ann_out <= bias;
      end else if (p_valid) begin
        ann_out   <= ann_out + ACC_W_P'(product);
        out_valid <= 1'b1;
      end
    end
  end

  // Sign activation: f(s) = +1 for s >= 0, -1 for s < 0.
  assign act = !ann_out[ACC_W_P-1];

  // x, y and busy are observation points of the multiplier only.
  logic unused_ok;
  assign unused_ok = ^{x, y, mul_busy};

endmodule
