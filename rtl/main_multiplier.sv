// main_multiplier: coefficient multiplier, P = X * Y, with X the input
// operand and Y a coefficient fetched from memory.
//
// Three parts, named after the reference simulation of the design: M0 is
// the input register that captures the operand b (output x), M1 is the
// coefficient memory read at address add0 (output y), and the
// significance-driven shift-and-add unit forms the product p.
//
// Operation: while read is high and the unit is idle, one cycle captures b
// into M0 and issues the memory read; the next cycle starts the shift-and-add
// unit with x and the word read (y); p_valid pulses with the product one to
// DATA_W cycles later (one cycle per set coefficient bit used). The unit
// then returns to idle and, if read is still high, begins the next operation
// with the current b and add0. A full operation therefore takes
// 2 + max(1, min(popcount(y), prec)) cycles from acceptance to p_valid.
// prec limits the number of partial products (see simul_mult); DATA_W gives
// exact products; terms gives the number of partial products used for p.
// The memory write port (wr_en, wr_addr, wr_data) loads new
// coefficients. Reset (rst) is active high and clears x and p; y holds the last
// word read (undefined before the first read).
//
// The three-part structure and the signal names follow the design; the
// sequencing and handshake are this implementation's choices.
module main_multiplier
  import simul_pkg::*;
#(
  parameter int unsigned DATA_W_P = simul_pkg::DATA_W,
  parameter int unsigned ADDR_W_P = simul_pkg::ADDR_W,
  localparam int unsigned P_W = 2 * DATA_W_P,
  localparam int unsigned K_W = $clog2(DATA_W_P + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                read,
  input  logic [DATA_W_P-1:0] b,
  input  logic [ADDR_W_P-1:0] add0,
  input  logic [K_W-1:0]      prec,
  input  logic                wr_en,
  input  logic [ADDR_W_P-1:0] wr_addr,
  input  logic [DATA_W_P-1:0] wr_data,
  output logic [DATA_W_P-1:0] x,
  output logic [DATA_W_P-1:0] y,
  output logic [P_W-1:0]      p,
  output logic                p_valid,
  output logic [K_W-1:0]      terms,
  output logic                busy
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_MULT} state_t;
  state_t state_q;

  logic           mul_start, mul_busy, mul_done;
  logic [P_W-1:0] mul_p;
  logic [K_W-1:0] mul_terms;
  logic [K_W-1:0] prec_q;
  logic           accept;

  assign accept    = (state_q == S_IDLE) && read;
  assign mul_start = (state_q == S_FETCH);
  assign busy      = (state_q != S_IDLE);

  // M0: input register.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      x      <= '0;
      prec_q <= '0;
    end else if (accept) begin
      x      <= b;
      prec_q <= prec;
    end
  end

  // M1: coefficient memory.
  coef_mem #(.ADDR_W_P(ADDR_W_P), .DATA_W_P(DATA_W_P)) m1 (
    .clk     (clk),
    .rd_en   (accept),
    .rd_addr (add0),
    .rd_data (y),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data)
  );

  // Shift-and-add unit.
  simul_mult #(.A_W(DATA_W_P), .C_W(DATA_W_P)) mul (
    .clk   (clk),
    .rst (rst),
    .start (mul_start),
    .a     (x),
    .coef  (y),
    .prec  (prec_q),
    .busy  (mul_busy),
    .done  (mul_done),
    .p     (mul_p),
    .terms (mul_terms)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q <= S_IDLE;
      p       <= '0;
      p_valid <= 1'b0;
      terms   <= '0;
    end else begin
      p_valid <= 1'b0;
      unique case (state_q)
        S_IDLE:  if (read) state_q <= S_FETCH;
        S_FETCH: state_q <= S_MULT;
        S_MULT:  if (mul_done) begin
                   state_q <= S_IDLE;
                   p       <= mul_p;
                   terms   <= mul_terms;
                   p_valid <= 1'b1;
                 end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The shift-and-add unit must be free whenever a product is started.
  assert property (@(posedge clk) disable iff (rst) mul_start |-> !mul_busy);

endmodule
