// prng_osc_pipelined: pipelined FDNR chaotic pseudo-random bit generator with built-in
// post-processing.
//
// fdnr_core runs 4 interleaved trajectories of the FDNR jerk oscillator; each of its three
// channels X, Y, Z has its own pp_xor_rot, which combines three successive words of that
// channel with its previous output rotated by multiples of P_ARITH/4. The composer joins
// the three results into one 3*P_ARITH-bit word, out_qxyz = {Qx, Qy, Qz} (the bit order is
// this implementation's choice). After seeding a new word leaves every output on every clock.
//
// Usage: hold rst for one clock, then hold init_sel high for 4 clocks while presenting 4
// different seed triples (signed fixed point, INT_BITS integer bits; values on or near the
// attractor, e.g. |X|, |Y|, |Z| below 2), then drop init_sel. The outputs change from the first
// seeding clock on; during the first two, the older two stream inputs of each post-processing
// unit are still reset zeros.
module prng_osc_pipelined #(
  parameter int unsigned P_ARITH  = prbg_pkg::OSC_P_ARITH_DEFAULT,
  parameter int unsigned INT_BITS = prbg_pkg::OSC_INT_BITS_DEFAULT,
  parameter int unsigned H_SHIFT  = prbg_pkg::OSC_H_SHIFT_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 init_sel,
  input  logic [P_ARITH-1:0]   init_x,
  input  logic [P_ARITH-1:0]   init_y,
  input  logic [P_ARITH-1:0]   init_z,
  output logic [P_ARITH-1:0]   out_qx,
  output logic [P_ARITH-1:0]   out_qy,
  output logic [P_ARITH-1:0]   out_qz,
  output logic [3*P_ARITH-1:0] out_qxyz
);

  logic [P_ARITH-1:0] x_next, y_next, z_next;
  logic [P_ARITH-1:0] x_q, y_q, z_q;
  logic [P_ARITH-1:0] x_d1, y_d1, z_d1;

  fdnr_core #(.P_ARITH(P_ARITH), .INT_BITS(INT_BITS), .H_SHIFT(H_SHIFT)) u_core (
    .clk, .rst, .init_sel, .init_x, .init_y, .init_z,
    .x_next, .y_next, .z_next, .x_q, .y_q, .z_q, .x_d1, .y_d1, .z_d1
  );

  pp_xor_rot #(.W(P_ARITH), .RL(P_ARITH / 4)) u_pp_x (
    .clk, .rst, .x0(x_next), .x1(x_q), .x2(x_d1), .q(out_qx)
  );
  pp_xor_rot #(.W(P_ARITH), .RL(P_ARITH / 4)) u_pp_y (
    .clk, .rst, .x0(y_next), .x1(y_q), .x2(y_d1), .q(out_qy)
  );
  pp_xor_rot #(.W(P_ARITH), .RL(P_ARITH / 4)) u_pp_z (
    .clk, .rst, .x0(z_next), .x1(z_q), .x2(z_d1), .q(out_qz)
  );

  // Composer Q(Qx Qy Qz)
  assign out_qxyz = {out_qx, out_qy, out_qz};

endmodule
