// prng_log_pipelined: pipelined logistic-map pseudo-random bit generator with built-in
// post-processing.
//
// logistic_core runs PIPE_DEPTH interleaved trajectories of x' = 4x(1 - x) in P_ARITH-bit
// fixed point; pp_xor_rot combines three successive words of that stream with its own
// previous output, rotated by multiples of P_ARITH/4, into out_q. After seeding, out_q
// carries a new P_ARITH-bit word on every clock, and all of its bits are used: no bit
// positions are discarded.
//
// Usage: hold rst for one clock, then hold init_select high for PIPE_DEPTH clocks while
// presenting PIPE_DEPTH different seeds (fractions in (0,1), avoiding 0, 1/4, 1/2, 3/4 and 1),
// then drop init_select. out_q changes from the first seeding clock on; during the first two
// seeding clocks the older two of its three stream inputs are still reset zeros.
module prng_log_pipelined #(
  parameter int unsigned P_ARITH    = prbg_pkg::LOG_P_ARITH_DEFAULT,
  parameter int unsigned PIPE_DEPTH = prbg_pkg::LOG_PIPE_DEPTH_DEFAULT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               init_select,
  input  logic [P_ARITH-1:0] init_x,
  output logic [P_ARITH-1:0] out_q
);

  logic [P_ARITH-1:0] x_next, x_q, x_d1;

  logistic_core #(.P_ARITH(P_ARITH), .PIPE_DEPTH(PIPE_DEPTH)) u_core (
    .clk, .rst, .init_select, .init_x, .x_next, .x_q, .x_d1
  );

  pp_xor_rot #(.W(P_ARITH), .RL(P_ARITH / 4)) u_pp (
    .clk, .rst, .x0(x_next), .x1(x_q), .x2(x_d1), .q(out_q)
  );

endmodule
