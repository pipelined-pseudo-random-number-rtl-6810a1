// tb_fdnr_core: loads 4 seed triples into the 64-bit FDNR loop, runs 4 x 6000 clocks, reloads in
// mid-run, and after every clock compares the three state registers, their delay taps and the
// mux outputs with a stream model: triple n is the seed if init_sel was high at that edge,
// otherwise one Euler step (h = 1/16, B = 4 when Y >= 1 else 0, done with multiplications on
// 64-bit integers) of triple n-4. It counts how often each value of B was taken (both must
// occur) and checks that every trajectory stays inside the attractor's bounding box.
module tb_fdnr_core;
  import prbg_ref_pkg::*;
  localparam int unsigned P  = 64;
  localparam int unsigned IB = 8;
  localparam int unsigned FB = P - IB;
  localparam int unsigned HS = 4;
  localparam int unsigned M  = prbg_pkg::OSC_PIPE_DEPTH;

  logic         clk = 1'b0;
  logic         rst;
  logic         init_sel;
  logic [P-1:0] init_x, init_y, init_z;
  logic [P-1:0] x_next, y_next, z_next, x_q, y_q, z_q, x_d1, y_d1, z_d1;
  int checks = 0, failures = 0;
  word_t hx [$], hy [$], hz [$];
  int b_high_cnt = 0, b_low_cnt = 0, seeded = 0;
  real xmin = 0.0, xmax = 0.0;

  fdnr_core #(.P_ARITH(P), .INT_BITS(IB), .H_SHIFT(HS)) dut (
    .clk, .rst, .init_sel, .init_x, .init_y, .init_z,
    .x_next, .y_next, .z_next, .x_q, .y_q, .z_q, .x_d1, .y_d1, .z_d1);

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

  task automatic cmp(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("n=%0d %s: got %h expected %h", hx.size(), what, got, exp);
    end
  endtask

  task automatic step(input logic sel, input real sx0, sy0, sz0);
    word_t ex, ey, ez;
    bit bh;
    int n;
    real rx;
    n = hx.size();
    init_sel = sel;
    init_x = to_fix(sx0, P, FB); init_y = to_fix(sy0, P, FB); init_z = to_fix(sz0, P, FB);
    #1;
    if (sel) begin
      ex = init_x; ey = init_y; ez = init_z; seeded++;
    end else begin
      osc_step(g(hx, n - int'(M)), g(hy, n - int'(M)), g(hz, n - int'(M)), P, FB, HS, ex, ey, ez, bh);
      if (bh) b_high_cnt++; else b_low_cnt++;
    end
    cmp("x_next", x_next, ex); cmp("y_next", y_next, ey); cmp("z_next", z_next, ez);
    @(posedge clk); #1;
    hx.push_back(ex); hy.push_back(ey); hz.push_back(ez);
    cmp("x_q", x_q, ex); cmp("y_q", y_q, ey); cmp("z_q", z_q, ez);
    cmp("x_d1", x_d1, g(hx, n - 1)); cmp("y_d1", y_d1, g(hy, n - 1)); cmp("z_d1", z_d1, g(hz, n - 1));
    rx = to_real(ex, P, FB);
    if (rx < xmin) xmin = rx;
    if (rx > xmax) xmax = rx;
    checks++;
    if (rx > 8.0 || rx < -8.0 || to_real(ey, P, FB) > 8.0 || to_real(ey, P, FB) < -8.0 ||
        to_real(ez, P, FB) > 8.0 || to_real(ez, P, FB) < -8.0) begin
      failures++;
      if (failures < 10) $display("n=%0d left the attractor box", n);
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
    for (int t = 0; t < 6000 * int'(M); t++) step(1'b0, 0.0, 0.0, 0.0);
    step(1'b1,  0.30,  0.10, -0.10);
    step(1'b1, -0.40,  0.20,  0.30);
    step(1'b1,  0.70, -0.60,  0.00);
    step(1'b1,  0.05,  0.05,  0.05);
    for (int t = 0; t < 500 * int'(M); t++) step(1'b0, 0.0, 0.0, 0.0);
    $display("B=4 taken %0d times, B=0 taken %0d times, X range %f .. %f", b_high_cnt, b_low_cnt, xmin, xmax);
    checks++;
    if (b_high_cnt == 0 || b_low_cnt == 0) begin failures++; $display("a branch of B never taken"); end
    checks++;
    if (xmin > -2.0) begin failures++; $display("trajectory did not spread over the attractor"); end
    checks++;
    if (seeded != 8) begin failures++; $display("seed count %0d", seeded); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
