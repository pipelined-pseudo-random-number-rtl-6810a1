// osc_gen_check: self-contained check of one prng_osc_pipelined configuration, for use inside
// a testbench that sweeps sizes. It resets and seeds the generator with 4 triples, runs it for
// STEPS clocks and compares the composed output after every clock with its own model (seed, or
// one Euler step of the triple 4 positions earlier, then per-channel post-processing). It also
// counts the steps in which B = 4 was taken, which must be non-zero.
module osc_gen_check #(
  parameter int unsigned P     = 32,
  parameter int          STEPS = 8000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import prbg_ref_pkg::*;
  localparam int unsigned FB = P - prbg_pkg::OSC_INT_BITS_DEFAULT;
  localparam int unsigned M  = prbg_pkg::OSC_PIPE_DEPTH;

  logic           rst, init_sel;
  logic [P-1:0]   init_x, init_y, init_z, out_qx, out_qy, out_qz;
  logic [3*P-1:0] out_qxyz;
  word_t hx [$], hy [$], hz [$];
  word_t qx, qy, qz;
  int b_high;

  prng_osc_pipelined #(.P_ARITH(P)) dut (.clk, .rst, .init_sel, .init_x, .init_y, .init_z,
                                         .out_qx, .out_qy, .out_qz, .out_qxyz);

  function automatic word_t g(ref word_t q [$], input int n);
    return (n < 0) ? '0 : q[n];
  endfunction

  initial begin
    real seed [4][3] = '{'{0.10, 0.00, 0.00}, '{0.50, -0.25, 0.10}, '{-1.00, 0.50, -0.30}, '{0.20, 1.20, 0.40}};
    word_t wx, wy, wz;
    bit bh;
    int n;
    done = 1'b0; checks = 0; failures = 0; b_high = 0; qx = '0; qy = '0; qz = '0;
    rst = 1'b1; init_sel = 1'b0; init_x = '0; init_y = '0; init_z = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < STEPS; t++) begin
      n = hx.size();
      init_sel = (t < int'(M));
      init_x = P'(to_fix(seed[t % 4][0], P, FB));
      init_y = P'(to_fix(seed[t % 4][1], P, FB));
      init_z = P'(to_fix(seed[t % 4][2], P, FB));
      if (init_sel) begin
        wx = word_t'(init_x); wy = word_t'(init_y); wz = word_t'(init_z);
      end else begin
        osc_step(g(hx, n - int'(M)), g(hy, n - int'(M)), g(hz, n - int'(M)), P, FB,
                 prbg_pkg::OSC_H_SHIFT_DEFAULT, wx, wy, wz, bh);
        if (bh) b_high++;
      end
      qx = pp_step(wx, g(hx, n - 1), g(hx, n - 2), qx, P);
      qy = pp_step(wy, g(hy, n - 1), g(hy, n - 2), qy, P);
      qz = pp_step(wz, g(hz, n - 1), g(hz, n - 2), qz, P);
      hx.push_back(wx); hy.push_back(wy); hz.push_back(wz);
      @(posedge clk); #1;
      checks++;
      if (out_qxyz !== {qx[P-1:0], qy[P-1:0], qz[P-1:0]}) begin
        failures++;
        if (failures < 5) $display("FDNR P=%0d n=%0d: got %h", P, n, out_qxyz);
      end
    end
    checks++;
    if (b_high == 0) begin failures++; $display("FDNR P=%0d: B = 4 never taken", P); end
    done = 1'b1;
  end
endmodule
