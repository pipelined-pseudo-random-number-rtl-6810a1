// tb_prng_osc_pipelined: seeds the 64-bit FDNR generator with 4 triples, runs it and reseeds
// it in mid-run. The testbench rebuilds the X, Y and Z streams (seed, or one Euler step of the
// triple 4 positions earlier) and each channel's post-processed word, and compares out_qx,
// out_qy, out_qz and the composed 192-bit out_qxyz = {Qx, Qy, Qz} after every clock. It checks
// that both values of B occur and that a new 192-bit word appears on every clock.
module tb_prng_osc_pipelined;
  import prbg_ref_pkg::*;
  localparam int unsigned P  = 64;
  localparam int unsigned FB = P - 8;
  localparam int unsigned M  = 4;

  logic           clk = 1'b0;
  logic           rst;
  logic           init_sel;
  logic [P-1:0]   init_x, init_y, init_z, out_qx, out_qy, out_qz;
  logic [3*P-1:0] out_qxyz;
  int checks = 0, failures = 0;
  word_t hx [$], hy [$], hz [$];
  word_t qx = '0, qy = '0, qz = '0;
  logic [3*P-1:0] prev_xyz;
  int b_high = 0, b_low = 0, changed = 0, running = 0;

  prng_osc_pipelined #(.P_ARITH(P)) dut (.clk, .rst, .init_sel, .init_x, .init_y, .init_z,
                                         .out_qx, .out_qy, .out_qz, .out_qxyz);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t g(ref word_t q [$], input int n);
    return (n < 0) ? '0 : q[n];
  endfunction

  task automatic cmp(input string what, input logic [3*P-1:0] got, input logic [3*P-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("n=%0d %s: got %h expected %h", hx.size(), what, got, exp);
    end
  endtask

  task automatic step(input logic sel, input real sx0, sy0, sz0);
    word_t wx, wy, wz;
    bit bh;
    int n;
    n = hx.size();
    init_sel = sel;
    init_x = to_fix(sx0, P, FB); init_y = to_fix(sy0, P, FB); init_z = to_fix(sz0, P, FB);
    if (sel) begin
      wx = init_x; wy = init_y; wz = init_z;
    end else begin
      osc_step(g(hx, n - int'(M)), g(hy, n - int'(M)), g(hz, n - int'(M)), P, FB, 4, wx, wy, wz, bh);
      if (bh) b_high++; else b_low++;
    end
    qx = pp_step(wx, g(hx, n - 1), g(hx, n - 2), qx, P);
    qy = pp_step(wy, g(hy, n - 1), g(hy, n - 2), qy, P);
    qz = pp_step(wz, g(hz, n - 1), g(hz, n - 2), qz, P);
    hx.push_back(wx); hy.push_back(wy); hz.push_back(wz);
    prev_xyz = out_qxyz;
    @(posedge clk); #1;
    cmp("out_qx", 3*P'(out_qx), 3*P'(qx));
    cmp("out_qy", 3*P'(out_qy), 3*P'(qy));
    cmp("out_qz", 3*P'(out_qz), 3*P'(qz));
    cmp("out_qxyz", out_qxyz, {qx, qy, qz});
    if (!sel) begin
      running++;
      if (out_qxyz != prev_xyz) changed++;
    end
  endtask

  initial begin
    rst = 1'b1; init_sel = 1'b0; init_x = '0; init_y = '0; init_z = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    step(1'b1,  0.10,  0.00,  0.00);
    step(1'b1,  0.50, -0.25,  0.10);
    step(1'b1, -1.00,  0.50, -0.30);
    step(1'b1,  0.20,  1.20,  0.40);
    for (int t = 0; t < 3000 * int'(M); t++) step(1'b0, 0.0, 0.0, 0.0);
    step(1'b1,  0.30,  0.10, -0.10);
    step(1'b1, -0.40,  0.20,  0.30);
    step(1'b1,  0.70, -0.60,  0.00);
    step(1'b1,  0.05,  0.05,  0.05);
    for (int t = 0; t < 500 * int'(M); t++) step(1'b0, 0.0, 0.0, 0.0);
    checks++;
    if (b_high == 0 || b_low == 0) begin failures++; $display("a branch of B never taken"); end
    checks++;
    if (changed != running) begin failures++; $display("only %0d of %0d clocks gave a new word", changed, running); end
    $display("B=4 %0d times, B=0 %0d times; %0d clocks, %0d new words", b_high, b_low, running, changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
