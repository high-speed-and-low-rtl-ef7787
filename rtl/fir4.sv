// fir4: four-tap direct-form FIR filter whose taps are shift-and-add
// multipliers.
//
//   y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k]        (unsigned, exact at full
//                                                    precision)
//
// A delay line keeps the last TAPS input samples. When a sample is
// accepted, the delay line shifts and all TAPS significance-driven
// shift-and-add multipliers (simul_mult) start at once, tap k on x[n-k]
// and coefficient h[k]. When the slowest of them has finished, their
// products are summed by an adder tree into y. The coefficients sit in a
// small register file that powers up / resets to h[k] = k + 1 (the same
// default table as the coefficient memory) and can be rewritten through
// coef_we / coef_addr / coef_data while the filter is idle or running (a
// write lands at the next clock edge and affects samples accepted after
// it). The delay line starts empty (all zero) after reset.
//
// Interface and timing: valid/ready input handshake (in_valid, in_ready,
// x_in); a sample is accepted on a clock edge where both are high. y_out is
// updated and out_valid is high for one cycle L + 1 cycles after
// acceptance, where L = max over taps of max(1, min(popcount(h[k]), prec)).
// in_ready is low from acceptance until that cycle, so at most one sample
// is in flight. prec (sampled per sample) limits each tap's partial
// products as in simul_mult; DATA_W gives exact results.
//
// The filter is named by the design (8-bit multipliers, four taps) without
// a structure; the direct form, the coefficient register file and the
// handshake are this implementation's choices.
module fir4
  import simul_pkg::*;
#(
  parameter int unsigned TAPS     = simul_pkg::N_UNITS,
  parameter int unsigned DATA_W_P = simul_pkg::DATA_W,
  localparam int unsigned P_W  = 2 * DATA_W_P,
  localparam int unsigned Y_W  = P_W + $clog2(TAPS),
  localparam int unsigned K_W  = $clog2(DATA_W_P + 1),
  localparam int unsigned TA_W = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [DATA_W_P-1:0] x_in,
  input  logic [K_W-1:0]      prec,
  input  logic                coef_we,
  input  logic [TA_W-1:0]     coef_addr,
  input  logic [DATA_W_P-1:0] coef_data,
  output logic [Y_W-1:0]      y_out,
  output logic                out_valid,
  output logic [K_W-1:0]      max_terms
);

  logic [DATA_W_P-1:0] dly_q [TAPS];   // dly_q[k] = x[n-k]
  logic [DATA_W_P-1:0] h_q   [TAPS];
  logic [DATA_W_P-1:0] dly_nxt [TAPS];
  logic [P_W-1:0]      p     [TAPS];
  logic [K_W-1:0]      terms [TAPS];
  logic [TAPS-1:0]     busy_v, done_v;
  logic                running_q, accept;

  assign in_ready = !running_q;
  assign accept   = in_valid && in_ready;

  always_comb begin
    dly_nxt[0] = x_in;
    for (int unsigned k = 1; k < TAPS; k++) dly_nxt[k] = dly_q[k-1];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    simul_mult #(.A_W(DATA_W_P), .C_W(DATA_W_P)) mul (
      .clk   (clk),
      .rst (rst),
      .start (accept),
      .a     (dly_nxt[k]),
      .coef  (h_q[k]),
      .prec  (prec),
      .busy  (busy_v[k]),
      .done  (done_v[k]),
      .p     (p[k]),
      .terms (terms[k])
    );
  end

  // Adder tree (written as a sum; synthesis builds the tree) and the
  // largest iteration count of this sample.
  logic [Y_W-1:0] sum;
  logic [K_W-1:0] tmax;
  always_comb begin
    sum  = '0;
    tmax = '0;
    for (int unsigned k = 0; k < TAPS; k++) begin
      sum = sum + Y_W'(p[k]);
      if (terms[k] > tmax) tmax = terms[k];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int unsigned k = 0; k < TAPS; k++) begin
        dly_q[k] <= '0;
        h_q[k]   <= DATA_W_P'(k + 1);
      end
      running_q <= 1'b0;
      y_out     <= '0;
      out_valid <= 1'b0;
      max_terms <= '0;
    end else begin
      out_valid <= 1'b0;
      if (coef_we) h_q[coef_addr] <= coef_data;
      if (accept) begin
        dly_q     <= dly_nxt;
        running_q <= 1'b1;
      end else if (running_q && busy_v == '0) begin
        running_q <= 1'b0;
        y_out     <= sum;
        out_valid <= 1'b1;
        max_terms <= tmax;
      end
    end
  end

  // Every tap finishes exactly once per accepted sample, and only while the
  // filter is running.
  assert property (@(posedge clk) disable iff (rst) (done_v != '0) |-> running_q);

endmodule
