// simul_top: the two applications of the significance-driven shift-and-add
// multiplier, side by side on one clock and reset.
//
//   nn_*   neural accelerator (nn_accelerator): four neurons, each
//          accumulating fuzzy_weight * coef[address] onto its bias while
//          nn_en is high, with a sign activation output per neuron.
//   fir_*  four-tap FIR filter (fir4): y[n] = sum_k h[k] * x[n-k], one
//          sample in flight at a time under a valid/ready handshake.
//
// The two share nothing but clock and reset; each has its own precision
// input (number of most significant coefficient bits used per product,
// DATA_W for exact results) and its own coefficient write port. All ports
// are plain signals or unpacked arrays. Timing is that of the two blocks
// (see their headers). Reset (rst) is active high and asynchronous.
//
// Placing the accelerator and the filter next to each other in one top is
// this implementation's choice; the design describes both around the same
// 8-bit multiplier.
module simul_top
  import simul_pkg::*;
#(
  parameter int unsigned N_NEURONS = simul_pkg::N_UNITS,
  parameter int unsigned TAPS      = simul_pkg::N_UNITS,
  parameter int unsigned DATA_W_P  = simul_pkg::DATA_W,
  parameter int unsigned ADDR_W_P  = simul_pkg::ADDR_W,
  parameter int unsigned ACC_W_P   = simul_pkg::ACC_W,
  localparam int unsigned K_W  = $clog2(DATA_W_P + 1),
  localparam int unsigned Y_W  = 2 * DATA_W_P + $clog2(TAPS),
  localparam int unsigned TA_W = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  // neural accelerator
  input  logic                 nn_en,
  input  logic                 nn_clr,
  input  logic [K_W-1:0]       nn_prec,
  input  logic [DATA_W_P-1:0]  nn_fuzzy_weight [N_NEURONS],
  input  logic [ADDR_W_P-1:0]  nn_address      [N_NEURONS],
  input  logic [N_NEURONS-1:0] nn_wr_en,
  input  logic [ADDR_W_P-1:0]  nn_wr_addr,
  input  logic [DATA_W_P-1:0]  nn_wr_data,
  input  logic [ACC_W_P-1:0]   nn_bias         [N_NEURONS],
  output logic [ACC_W_P-1:0]   nn_ann_out      [N_NEURONS],
  output logic [N_NEURONS-1:0] nn_act,
  output logic [N_NEURONS-1:0] nn_out_valid,
  output logic [K_W-1:0]       nn_terms        [N_NEURONS],
  // four-tap FIR filter
  input  logic                 fir_in_valid,
  output logic                 fir_in_ready,
  input  logic [DATA_W_P-1:0]  fir_x_in,
  input  logic [K_W-1:0]       fir_prec,
  input  logic                 fir_coef_we,
  input  logic [TA_W-1:0]      fir_coef_addr,
  input  logic [DATA_W_P-1:0]  fir_coef_data,
  output logic [Y_W-1:0]       fir_y_out,
  output logic                 fir_out_valid,
  output logic [K_W-1:0]       fir_max_terms
);

  nn_accelerator #(
    .N_NEURONS (N_NEURONS),
    .DATA_W_P  (DATA_W_P),
    .ADDR_W_P  (ADDR_W_P),
    .ACC_W_P   (ACC_W_P)
  ) u_nn (
    .clk          (clk),
    .rst        (rst),
    .en           (nn_en),
    .clr          (nn_clr),
    .prec         (nn_prec),
    .fuzzy_weight (nn_fuzzy_weight),
    .address      (nn_address),
    .wr_en        (nn_wr_en),
    .wr_addr      (nn_wr_addr),
    .wr_data      (nn_wr_data),
    .bias         (nn_bias),
    .ann_out      (nn_ann_out),
    .act          (nn_act),
    .out_valid    (nn_out_valid),
    .terms        (nn_terms)
  );

  fir4 #(
    .TAPS     (TAPS),
    .DATA_W_P (DATA_W_P)
  ) u_fir (
    .clk       (clk),
    .rst     (rst),
    .in_valid  (fir_in_valid),
    .in_ready  (fir_in_ready),
    .x_in      (fir_x_in),
    .prec      (fir_prec),
    .coef_we   (fir_coef_we),
    .coef_addr (fir_coef_addr),
    .coef_data (fir_coef_data),
    .y_out     (fir_y_out),
    .out_valid (fir_out_valid),
    .max_terms (fir_max_terms)
  );

endmodule
