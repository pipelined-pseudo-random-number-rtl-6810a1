// tb_prbg_top: end-to-end test of both generators at their default sizes (64-bit logistic map
// with 13 interleaved trajectories, 64-bit FDNR oscillator with 4), run concurrently.
//
// Both are seeded, run for RUN clocks, reseeded in mid-run and run again. Every output word is
// compared after every clock with the testbench's own model of the streams and of the
// post-processing. The testbench counts each mechanism of the design and fails if one never
// happened: seed loading and reloading on each generator, both values of the FDNR switch B,
// distinct interleaved trajectories, the feedback term of the post-processing changing the
// output, and one new word per clock. It also measures, per bit position, how often a bit is 1
// in the raw FDNR X words and in the post-processed Qx words: the raw sign and integer bits are
// strongly biased, and after post-processing every position must lie within 0.45 .. 0.55.
module tb_prbg_top;
  import prbg_ref_pkg::*;
  localparam int unsigned LP  = prbg_pkg::LOG_P_ARITH_DEFAULT;
  localparam int unsigned LM  = prbg_pkg::LOG_PIPE_DEPTH_DEFAULT;
  localparam int unsigned OP  = prbg_pkg::OSC_P_ARITH_DEFAULT;
  localparam int unsigned OFB = OP - prbg_pkg::OSC_INT_BITS_DEFAULT;
  localparam int unsigned OM  = prbg_pkg::OSC_PIPE_DEPTH;
  localparam int unsigned OHS = prbg_pkg::OSC_H_SHIFT_DEFAULT;
  localparam int RUN = 20000;

  logic            clk = 1'b0;
  logic            rst;
  logic            log_init_select;
  logic [LP-1:0]   log_init_x, log_out_q;
  logic            osc_init_sel;
  logic [OP-1:0]   osc_init_x, osc_init_y, osc_init_z, osc_out_qx, osc_out_qy, osc_out_qz;
  logic [3*OP-1:0] osc_out_qxyz;

  int checks = 0, failures = 0;
  word_t lh [$], hx [$], hy [$], hz [$];
  word_t lq = '0, qx = '0, qy = '0, qz = '0;
  logic [LP-1:0]   prev_lq;
  logic [3*OP-1:0] prev_xyz;

  // mechanism counters
  int log_seeds = 0, log_reseeds = 0, osc_seeds = 0, osc_reseeds = 0;
  int b_high = 0, b_low = 0, fb_effect = 0, log_new = 0, osc_new = 0, running = 0;
  int raw_ones [OP], pp_ones [OP];
  int samples = 0;

  prbg_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * RUN) @(posedge clk);
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
      if (failures < 10) $display("clock %0d %s: got %h expected %h", lh.size(), what, got, exp);
    end
  endtask

  // One clock of both generators. lsel/osel load seeds; reseed marks a reload in mid-run.
  task automatic step(input logic lsel, input word_t lseed, input logic osel, input real sx0, sy0, sz0,
                      input bit reseed, input bit measure);
    word_t lw, wx, wy, wz;
    bit bh;
    int n;
    n = lh.size();
    log_init_select = lsel; log_init_x = lseed;
    osc_init_sel = osel;
    osc_init_x = to_fix(sx0, OP, OFB); osc_init_y = to_fix(sy0, OP, OFB); osc_init_z = to_fix(sz0, OP, OFB);
    // logistic model
    lw = lsel ? lseed : log_step(g(lh, n - int'(LM)), LP);
    if (lsel) begin if (reseed) log_reseeds++; else log_seeds++; end
    lq = pp_step(lw, g(lh, n - 1), g(lh, n - 2), lq, LP);
    // FDNR model
    if (osel) begin
      wx = osc_init_x; wy = osc_init_y; wz = osc_init_z;
      if (reseed) osc_reseeds++; else osc_seeds++;
    end else begin
      osc_step(g(hx, n - int'(OM)), g(hy, n - int'(OM)), g(hz, n - int'(OM)), OP, OFB, OHS, wx, wy, wz, bh);
      if (bh) b_high++; else b_low++;
    end
    // the feedback term matters whenever rotl(Q,48) is non-zero
    if (rotl(qx, 3 * (OP / 4), OP) != '0) fb_effect++;
    qx = pp_step(wx, g(hx, n - 1), g(hx, n - 2), qx, OP);
    qy = pp_step(wy, g(hy, n - 1), g(hy, n - 2), qy, OP);
    qz = pp_step(wz, g(hz, n - 1), g(hz, n - 2), qz, OP);
    lh.push_back(lw); hx.push_back(wx); hy.push_back(wy); hz.push_back(wz);
    prev_lq = log_out_q; prev_xyz = osc_out_qxyz;
    @(posedge clk); #1;
    cmp("log_out_q", log_out_q, lq);
    cmp("osc_out_qx", osc_out_qx, qx);
    cmp("osc_out_qy", osc_out_qy, qy);
    cmp("osc_out_qz", osc_out_qz, qz);
    checks++;
    if (osc_out_qxyz !== {qx, qy, qz}) begin
      failures++;
      if (failures < 10) $display("clock %0d osc_out_qxyz mismatch", n);
    end
    if (!lsel && !osel) begin
      running++;
      if (log_out_q != prev_lq) log_new++;
      if (osc_out_qxyz != prev_xyz) osc_new++;
    end
    if (measure) begin
      samples++;
      for (int b = 0; b < int'(OP); b++) begin
        raw_ones[b] += int'(wx[b]);
        pp_ones[b]  += int'(qx[b]);
      end
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never happened: %s", what);
    end
  endtask

  initial begin
    real osc_seed [4][3] = '{'{0.10, 0.00, 0.00}, '{0.50, -0.25, 0.10}, '{-1.00, 0.50, -0.30}, '{0.20, 1.20, 0.40}};
    real worst_raw, worst_pp, f;
    int distinct;
    rst = 1'b1; log_init_select = 1'b0; log_init_x = '0;
    osc_init_sel = 1'b0; osc_init_x = '0; osc_init_y = '0; osc_init_z = '0;
    foreach (raw_ones[b]) begin raw_ones[b] = 0; pp_ones[b] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // first seeding: 13 logistic seeds; the 4 FDNR seeds go in during the first 4 of those clocks
    for (int k = 0; k < int'(LM); k++)
      step(1'b1, {$urandom, $urandom}, k < int'(OM),
           osc_seed[k % 4][0], osc_seed[k % 4][1], osc_seed[k % 4][2], 1'b0, 1'b0);
    for (int t = 0; t < RUN; t++)
      step(1'b0, '0, 1'b0, 0.0, 0.0, 0.0, 1'b0, t >= 1000);

    // interleaved trajectories must be distinct
    distinct = 1;
    for (int a = 0; a < int'(LM); a++)
      for (int b = a + 1; b < int'(LM); b++)
        if (lh[lh.size() - 1 - a] == lh[lh.size() - 1 - b]) distinct = 0;
    for (int a = 0; a < int'(OM); a++)
      for (int b = a + 1; b < int'(OM); b++)
        if (hx[hx.size() - 1 - a] == hx[hx.size() - 1 - b]) distinct = 0;

    // reseed both in mid-run
    for (int k = 0; k < int'(LM); k++)
      step(1'b1, {$urandom, $urandom}, k < int'(OM),
           -osc_seed[k % 4][0], osc_seed[k % 4][2], osc_seed[k % 4][1], 1'b1, 1'b0);
    for (int t = 0; t < RUN / 4; t++)
      step(1'b0, '0, 1'b0, 0.0, 0.0, 0.0, 1'b0, 1'b0);

    need("logistic seeds loaded", log_seeds);
    need("logistic seeds reloaded in mid-run", log_reseeds);
    need("FDNR seed triples loaded", osc_seeds);
    need("FDNR seed triples reloaded in mid-run", osc_reseeds);
    need("FDNR steps with B = 4 (Y >= 1)", b_high);
    need("FDNR steps with B = 0 (Y < 1)", b_low);
    need("post-processing steps with feedback", fb_effect);
    need("interleaved trajectories distinct", distinct);
    checks++;
    if (log_new != running || osc_new != running) begin
      failures++;
      $display("new words: logistic %0d, FDNR %0d, of %0d clocks", log_new, osc_new, running);
    end
    $display("%-40s %0d / %0d / %0d", "clocks / new logistic / new FDNR words", running, log_new, osc_new);

    worst_raw = 0.0; worst_pp = 0.0;
    for (int b = 0; b < int'(OP); b++) begin
      f = real'(raw_ones[b]) / real'(samples);
      if ((f - 0.5) ** 2 > worst_raw ** 2) worst_raw = f - 0.5;
      f = real'(pp_ones[b]) / real'(samples);
      if ((f - 0.5) ** 2 > worst_pp ** 2) worst_pp = f - 0.5;
    end
    $display("worst per-bit bias of ones, raw X %f, post-processed Qx %f", worst_raw, worst_pp);
    checks++;
    if (worst_pp > 0.05 || worst_pp < -0.05) begin failures++; $display("post-processed bits biased"); end
    need("raw X bit positions with bias above 0.05", (worst_raw > 0.05 || worst_raw < -0.05) ? 1 : 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
