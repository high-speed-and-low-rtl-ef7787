// nn_accelerator: array of N_NEURONS neurons, each with its own fuzzy weight
// input, coefficient address and accumulated output.
//
// Every neuron (ann_neuron) owns a shift-and-add multiplier with a private
// coefficient memory and works independently; all share clock, reset, the
// enable, the accumulator clear and the precision setting. With a constant
// weight w and address a held on a neuron while en is high, its output grows
// by w * coef[a] with every operation, which is how the design's accelerator
// simulation behaves (weights 1..4 at addresses 1..4 give outputs stepping by
// 2, 6, 12 and 20).
//
// Coefficient writes are broadcast on wr_addr/wr_data to the memories of the
// neurons whose bit is set in wr_en. clr loads every accumulator with its
// neuron's bias (w0). Per-neuron outputs: ann_out (ACC_W bits, two's
// complement, wraps), act (sign activation, 1 for +1), out_valid (one
// cycle with each new ann_out), and terms (the number of partial products
// in the last product, for energy accounting).
//
// Four neurons and the 8-bit operands follow the design; the shared control
// inputs and the write port are this implementation's choices.
module nn_accelerator
  import simul_pkg::*;
#(
  parameter int unsigned N_NEURONS = simul_pkg::N_UNITS,
  parameter int unsigned DATA_W_P  = simul_pkg::DATA_W,
  parameter int unsigned ADDR_W_P  = simul_pkg::ADDR_W,
  parameter int unsigned ACC_W_P   = simul_pkg::ACC_W,
  localparam int unsigned K_W = $clog2(DATA_W_P + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic                 clr,
  input  logic [K_W-1:0]       prec,
  input  logic [DATA_W_P-1:0]  fuzzy_weight [N_NEURONS],
  input  logic [ADDR_W_P-1:0]  address      [N_NEURONS],
  input  logic [N_NEURONS-1:0] wr_en,
  input  logic [ADDR_W_P-1:0]  wr_addr,
  input  logic [DATA_W_P-1:0]  wr_data,
  input  logic [ACC_W_P-1:0]   bias         [N_NEURONS],
  output logic [ACC_W_P-1:0]   ann_out      [N_NEURONS],
  output logic [N_NEURONS-1:0] act,
  output logic [N_NEURONS-1:0] out_valid,
  output logic [K_W-1:0]       terms        [N_NEURONS]
);

  for (genvar n = 0; n < N_NEURONS; n++) begin : g_neuron
    logic [2*DATA_W_P-1:0] product;

    ann_neuron #(.DATA_W_P(DATA_W_P), .ADDR_W_P(ADDR_W_P), .ACC_W_P(ACC_W_P)) ann (
      .clk       (clk),
      .rst     (rst),
      .en        (en),
      .clr       (clr),
      .weight    (fuzzy_weight[n]),
      .addr      (address[n]),
      .prec      (prec),
      .wr_en     (wr_en[n]),
      .wr_addr   (wr_addr),
      .wr_data   (wr_data),
      .bias      (bias[n]),
      .ann_out   (ann_out[n]),
      .act       (act[n]),
      .out_valid (out_valid[n]),
      .product   (product),
      .terms     (terms[n])
    );

    // The raw product is an observation point of the neuron only.
    logic unused_product;
    assign unused_product = ^product;
  end

endmodule
