// logistic_core: pipelined datapath of the logistic-map generator, x' = 4x(1 - x) (r = 4).
//
// The map is computed as (4*x) - (4*x*x): register X feeds a pipelined squarer and, in
// parallel, a delay line D of the same latency; both results are shifted left by two
// (multiplied by 4) and subtracted in a registered subtractor. A seed mux in front of
// register X selects either that result or the external seed. The loop from register X
// back to itself is PIPE_DEPTH clocks deep (register X, PIPE_DEPTH-2 squarer stages, the
// subtractor register), so PIPE_DEPTH independent trajectories circulate interleaved and
// a new word leaves the loop on every clock.
//
// Numbers are unsigned fractions of P_ARITH bits (value = word / 2^P_ARITH). The squarer keeps
// the upper half of the product and the shifts drop the two top bits, so the map is
// evaluated modulo 1, which is exact except that x = 1/2 maps to 0 (the usual fixed point
// of r = 4 in finite precision). The block structure follows the published diagram; the
// number format, the squarer pipelining and the reset are this implementation's choices.
//
// Seeding: while init_select is 1, init_x is written into register X on every clock. Holding
// it for PIPE_DEPTH clocks with PIPE_DEPTH seed words fills every slot of the loop. Seed k
// loaded at clock c reappears, iterated once, at clock c + PIPE_DEPTH.
//
// Outputs for the post-processing: x_next is the word register X takes at the next edge,
// x_q is register X, x_d1 is register X one clock earlier: three successive stream words.
module logistic_core #(
  parameter int unsigned P_ARITH    = prbg_pkg::LOG_P_ARITH_DEFAULT,
  parameter int unsigned PIPE_DEPTH = prbg_pkg::LOG_PIPE_DEPTH_DEFAULT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               init_select,
  input  logic [P_ARITH-1:0] init_x,
  output logic [P_ARITH-1:0] x_next,
  output logic [P_ARITH-1:0] x_q,
  output logic [P_ARITH-1:0] x_d1
);

  localparam int unsigned MUL_LAT = PIPE_DEPTH - 2;

  logic [P_ARITH-1:0] sq;          // (x*x), MUL_LAT clocks after register X
  logic [P_ARITH-1:0] d_taps [MUL_LAT];
  logic [P_ARITH-1:0] x_aligned;   // register X delayed by MUL_LAT (block D)
  logic [P_ARITH-1:0] four_x, four_xx;
  logic [P_ARITH-1:0] diff_q;      // (4*x) - (4*x*x), registered

  pipe_square #(.W(P_ARITH), .LAT(MUL_LAT)) u_square (
    .clk, .rst, .a(x_q), .p(sq)
  );

  delay_line #(.W(P_ARITH), .N(MUL_LAT)) u_d (
    .clk, .rst, .d(x_q), .taps(d_taps)
  );

  assign x_aligned = d_taps[MUL_LAT-1];
  assign x_d1      = d_taps[0];
  assign four_x    = x_aligned << 2;
  assign four_xx   = sq << 2;

  always_ff @(posedge clk) begin
    if (rst) diff_q <= '0;
    else     diff_q <= four_x - four_xx;
  end

  assign x_next = init_select ? init_x : diff_q;

  always_ff @(posedge clk) begin
    if (rst) x_q <= '0;
    else     x_q <= x_next;
  end

  initial assert (PIPE_DEPTH >= 3)
    else $error("logistic_core: PIPE_DEPTH must be at least 3");

endmodule
