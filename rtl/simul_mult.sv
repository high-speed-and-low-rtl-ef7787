// simul_mult: significance-driven iterative shift-and-add multiplier.
//
// Computes p = a * coef (unsigned) by adding shifted copies of the
// multiplicand, one per set bit of the coefficient, instead of stepping
// through all bit positions. The datapath is the one of the block diagram:
//   B       register holding the multiplicand a
//   SREG    shift register holding the coefficient bits still to be used
//   seq     adder sequencer: picks the most significant remaining bit of SREG
//           and gives its position S1 to the shifter (a priority encoder)
//   shifter B << S1
//   adder   Z1 + (B << S1)
//   Z1      accumulating product register, fed back into the adder
//   counter number of partial products added so far
// Because bits are taken most significant first, stopping early drops only
// the least significant partial products: the input prec (sampled at start)
// caps the number of partial products, trading accuracy for cycles and
// switching at run time. prec >= DATA_W (or >= the coefficient's number of
// set bits) gives the exact product; smaller values give a * c' where c'
// keeps only the prec most significant set bits of coef.
//
// Interface and timing: start is accepted when busy is low and samples a,
// coef and prec. The unit then spends one cycle per partial product
// (at least one cycle); on the last of them p is loaded with the result and
// done pulses high for one cycle, the same edge on which busy falls. Latency
// from start to done is max(1, min(popcount(coef), prec)) cycles; a new
// start may be given in the cycle done is high. terms reports how many
// partial products made the last result. Reset (rst) is active high and asynchronous.
//
// The block list (register, shifter, shift register, adder, counter, adder
// sequencer) and the significance-driven, precision-controlled iteration
// follow the design; the skipping of zero bits, the prec encoding and the
// handshake are this implementation's choices.
module simul_mult
  import simul_pkg::*;
#(
  parameter int unsigned A_W = simul_pkg::DATA_W,
  parameter int unsigned C_W = simul_pkg::DATA_W,
  localparam int unsigned P_W = A_W + C_W,
  localparam int unsigned S_W = (C_W > 1) ? $clog2(C_W) : 1,
  localparam int unsigned K_W = $clog2(C_W + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [A_W-1:0] a,
  input  logic [C_W-1:0] coef,
  input  logic [K_W-1:0] prec,
  output logic           busy,
  output logic           done,
  output logic [P_W-1:0] p,
  output logic [K_W-1:0] terms
);

  logic [A_W-1:0] b_q;      // register B
  logic [C_W-1:0] sreg_q;   // shift register: coefficient bits left to use
  logic [P_W-1:0] z1_q;     // product register Z1
  logic [K_W-1:0] cnt_q;    // counter of partial products
  logic [K_W-1:0] lim_q;    // precision limit for this product

  // Adder sequencer: position of the most significant remaining bit.
  logic [S_W-1:0] s1;
  always_comb begin
    s1 = '0;
    for (int unsigned i = 0; i < C_W; i++)
      if (sreg_q[i]) s1 = S_W'(i);
  end

  // Shifter and adder.
  logic [P_W-1:0] shifted, sum;
  logic           have_bit, last;
  logic [C_W-1:0] sreg_nxt;
  logic [K_W-1:0] cnt_nxt;

  always_comb begin
    have_bit = (sreg_q != '0) && (cnt_q < lim_q);
    shifted  = P_W'(b_q) << s1;
    sum      = have_bit ? z1_q + shifted : z1_q;
    sreg_nxt = sreg_q;
    if (have_bit) sreg_nxt[s1] = 1'b0;
    cnt_nxt  = have_bit ? cnt_q + 1'b1 : cnt_q;
    last     = (sreg_nxt == '0) || (cnt_nxt >= lim_q);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      b_q    <= '0;
      sreg_q <= '0;
      z1_q   <= '0;
      cnt_q  <= '0;
      lim_q  <= '0;
      p      <= '0;
      terms  <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        z1_q   <= sum;
        sreg_q <= sreg_nxt;
        cnt_q  <= cnt_nxt;
        if (last) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          p     <= sum;
          terms <= cnt_nxt;
        end
      end
      if (start && (!busy || last)) begin
        busy   <= 1'b1;
        b_q    <= a;
        sreg_q <= coef;
        z1_q   <= '0;
        cnt_q  <= '0;
        lim_q  <= prec;
      end
    end
  end

  // A start is only taken when the unit is free or finishing.
  property p_done_ends_busy;
    @(posedge clk) disable iff (rst) done |-> $past(busy);
  endproperty
  assert property (p_done_ends_busy);

endmodule
