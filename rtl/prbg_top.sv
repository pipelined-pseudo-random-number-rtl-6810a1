// prbg_top: the two pipelined chaotic pseudo-random bit generators side by side.
//
// u_log is the logistic-map generator (P_ARITH = 64, 13 interleaved trajectories, one
// 64-bit word per clock); u_osc is the FDNR oscillator generator (P_ARITH = 64, 4
// interleaved trajectories, one 192-bit word per clock). They are independent designs and
// share only the clock and the synchronous reset; each has its own seed-loading inputs and
// outputs. Seeds and outputs are plain ports: the host that loads seeds and collects the
// bits is outside this design.
module prbg_top #(
  parameter int unsigned LOG_P_ARITH    = prbg_pkg::LOG_P_ARITH_DEFAULT,
  parameter int unsigned LOG_PIPE_DEPTH = prbg_pkg::LOG_PIPE_DEPTH_DEFAULT,
  parameter int unsigned OSC_P_ARITH    = prbg_pkg::OSC_P_ARITH_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,
  // logistic-map generator
  input  logic                     log_init_select,
  input  logic [LOG_P_ARITH-1:0]   log_init_x,
  output logic [LOG_P_ARITH-1:0]   log_out_q,
  // FDNR generator
  input  logic                     osc_init_sel,
  input  logic [OSC_P_ARITH-1:0]   osc_init_x,
  input  logic [OSC_P_ARITH-1:0]   osc_init_y,
  input  logic [OSC_P_ARITH-1:0]   osc_init_z,
  output logic [OSC_P_ARITH-1:0]   osc_out_qx,
  output logic [OSC_P_ARITH-1:0]   osc_out_qy,
  output logic [OSC_P_ARITH-1:0]   osc_out_qz,
  output logic [3*OSC_P_ARITH-1:0] osc_out_qxyz
);

  prng_log_pipelined #(.P_ARITH(LOG_P_ARITH), .PIPE_DEPTH(LOG_PIPE_DEPTH)) u_log (
    .clk, .rst, .init_select(log_init_select), .init_x(log_init_x), .out_q(log_out_q)
  );

  prng_osc_pipelined #(.P_ARITH(OSC_P_ARITH)) u_osc (
    .clk, .rst, .init_sel(osc_init_sel),
    .init_x(osc_init_x), .init_y(osc_init_y), .init_z(osc_init_z),
    .out_qx(osc_out_qx), .out_qy(osc_out_qy), .out_qz(osc_out_qz), .out_qxyz(osc_out_qxyz)
  );

endmodule
