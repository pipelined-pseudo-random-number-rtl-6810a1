// fdnr_core: pipelined datapath of the FDNR (frequency dependent negative resistance)
// chaotic oscillator, i.e. the jerk equation  -X''' = X'' + B X' + X  solved by Euler's method:
//
//     X <= X + h*Y
//     Y <= Y + h*Z
//     Z <= Z - h*(Z + B*Y + X),     B = 4 if Y >= 1, else 0,     h = 2^-H_SHIFT.
//
// Multiplication by h is an arithmetic right shift by H_SHIFT and B*Y is a mux between Y<<2
// and 0, so the datapath needs only adders, shifts and registers. Every loop (register Z ->
// Z+BY -> Z+BY+X -> Z-h(...) -> register Z, and the shorter X and Y paths padded with z^-2
// delays) is 4 clocks deep, so 4 independent trajectories circulate interleaved and every
// clock produces a new (X, Y, Z) triple. The block structure, h, the B switch on Y < 1 and the
// loop depth follow the published design; beta1 = 4 / beta2 = 0 was chosen as the assignment
// that reproduces the published attractor, and the number format is this implementation's:
// signed two's complement, INT_BITS integer bits (sign included), P_ARITH-INT_BITS fraction bits.
//
// Seeding: while init_sel is 1, (init_x, init_y, init_z) is written into the state registers on
// every clock; 4 clocks with 4 different triples fill all slots. A triple loaded at clock c
// returns, advanced by one Euler step, at clock c + 4.
//
// Outputs for the post-processing, per channel: *_next is what the state register takes at the
// next edge, *_q the state register, *_d1 the state register one clock earlier.
module fdnr_core #(
  parameter int unsigned P_ARITH  = prbg_pkg::OSC_P_ARITH_DEFAULT,
  parameter int unsigned INT_BITS = prbg_pkg::OSC_INT_BITS_DEFAULT,
  parameter int unsigned H_SHIFT  = prbg_pkg::OSC_H_SHIFT_DEFAULT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               init_sel,
  input  logic [P_ARITH-1:0] init_x,
  input  logic [P_ARITH-1:0] init_y,
  input  logic [P_ARITH-1:0] init_z,
  output logic [P_ARITH-1:0] x_next,
  output logic [P_ARITH-1:0] y_next,
  output logic [P_ARITH-1:0] z_next,
  output logic [P_ARITH-1:0] x_q,
  output logic [P_ARITH-1:0] y_q,
  output logic [P_ARITH-1:0] z_q,
  output logic [P_ARITH-1:0] x_d1,
  output logic [P_ARITH-1:0] y_d1,
  output logic [P_ARITH-1:0] z_d1
);

  typedef logic signed [P_ARITH-1:0] fix_t;

  localparam int unsigned FRAC_BITS = P_ARITH - INT_BITS;
  localparam int unsigned DLY       = prbg_pkg::OSC_PIPE_DEPTH - 2;   // pDelayS depth: 2
  localparam fix_t ONE = fix_t'(1) <<< FRAC_BITS;

  logic [P_ARITH-1:0] x_dly [DLY];   // pDelayS_1 / pDelayS_3: X delayed 1 and 2
  logic [P_ARITH-1:0] y_dly [DLY];   // pDelayS_2: Y delayed 1 and 2
  logic [P_ARITH-1:0] z_dly [DLY];   // pDelayS_0: Z delayed 1 and 2

  logic  y_lt_one;                 // If (Y < 1): selects beta2
  fix_t  by;                       // B*Y
  fix_t  z_by_q;                   // Z + BY            (stage 1)
  fix_t  z_by_x_q;                 // Z + BY + X        (stage 2)
  fix_t  z_sub_q, y_add_q, x_add_q; // loop results    (stage 3)

  delay_line #(.W(P_ARITH), .N(DLY)) u_pdelays_0 (.clk, .rst, .d(z_q), .taps(z_dly));
  delay_line #(.W(P_ARITH), .N(DLY)) u_pdelays_2 (.clk, .rst, .d(y_q), .taps(y_dly));
  delay_line #(.W(P_ARITH), .N(DLY)) u_pdelays_3 (.clk, .rst, .d(x_q), .taps(x_dly));

  assign y_lt_one = fix_t'(y_q) < ONE;
  assign by       = y_lt_one ? '0 : (fix_t'(y_q) <<< prbg_pkg::OSC_BETA1_SHIFT);

  always_ff @(posedge clk) begin
    if (rst) begin
      z_by_q   <= '0;
      z_by_x_q <= '0;
      z_sub_q  <= '0;
      y_add_q  <= '0;
      x_add_q  <= '0;
    end else begin
      z_by_q   <= fix_t'(z_q) + by;
      z_by_x_q <= z_by_q + fix_t'(x_dly[0]);
      z_sub_q  <= fix_t'(z_dly[DLY-1]) - (z_by_x_q >>> H_SHIFT);
      y_add_q  <= fix_t'(y_dly[DLY-1]) + (fix_t'(z_dly[DLY-1]) >>> H_SHIFT);
      x_add_q  <= fix_t'(x_dly[DLY-1]) + (fix_t'(y_dly[DLY-1]) >>> H_SHIFT);
    end
  end

  assign x_next = init_sel ? init_x : x_add_q;
  assign y_next = init_sel ? init_y : y_add_q;
  assign z_next = init_sel ? init_z : z_sub_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q <= '0;
      y_q <= '0;
      z_q <= '0;
    end else begin
      x_q <= x_next;
      y_q <= y_next;
      z_q <= z_next;
    end
  end

  assign x_d1 = x_dly[0];
  assign y_d1 = y_dly[0];
  assign z_d1 = z_dly[0];

  initial assert (INT_BITS >= 6 && INT_BITS < P_ARITH)
    else $error("fdnr_core: INT_BITS must leave room for Z+BY+X (about +-20) and a fraction");

endmodule
