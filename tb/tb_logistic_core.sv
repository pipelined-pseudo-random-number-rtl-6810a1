// tb_logistic_core: loads 13 random seeds into the 64-bit, 13-deep logistic-map loop, runs it,
// reloads 13 new seeds in mid-run, and after every clock compares register X, the delay tap and
// the mux output with a stream model: word n is the seed if init_select was high at that edge,
// otherwise the logistic map (r = 4, computed with a 128-bit multiply) of word n-13. This checks
// the map, the loop depth of 13 clocks and the one-word-per-clock rate.
module tb_logistic_core;
  import prbg_ref_pkg::*;
  localparam int unsigned P = 64;
  localparam int unsigned M = 13;

  logic         clk = 1'b0;
  logic         rst;
  logic         init_select;
  logic [P-1:0] init_x, x_next, x_q, x_d1;
  int checks = 0, failures = 0;
  word_t hist [$];          // verified stream words, hist[n]
  int seeded = 0, iterated = 0;

  logistic_core #(.P_ARITH(P), .PIPE_DEPTH(M)) dut (.clk, .rst, .init_select, .init_x, .x_next, .x_q, .x_d1);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t h(input int n);
    return (n < 0) ? '0 : hist[n];
  endfunction

  task automatic cmp(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("n=%0d %s: got %h expected %h", hist.size(), what, got, exp);
    end
  endtask

  // One clock: present inputs, check the mux output, clock, check the registers.
  task automatic step(input logic sel, input word_t seed);
    word_t exp;
    int n;
    n = hist.size();
    init_select = sel; init_x = seed;
    #1;
    exp = sel ? seed : log_step(h(n - int'(M)), P);
    cmp("x_next", x_next, exp);
    @(posedge clk); #1;
    hist.push_back(exp);
    if (sel) seeded++; else iterated++;
    cmp("x_q", x_q, exp);
    cmp("x_d1", x_d1, h(n - 1));
  endtask

  initial begin
    rst = 1'b1; init_select = 1'b0; init_x = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < int'(M); k++) step(1'b1, {$urandom, $urandom});
    for (int t = 0; t < 200 * int'(M); t++) step(1'b0, {$urandom, $urandom});
    // the 13 trajectories must have stayed distinct and away from the fixed point 0
    for (int k = 0; k < int'(M); k++) begin
      checks++;
      if (hist[hist.size() - 1 - k] == '0) begin failures++; $display("slot %0d collapsed to 0", k); end
    end
    for (int k = 0; k < int'(M); k++) step(1'b1, {$urandom, $urandom});
    for (int t = 0; t < 50 * int'(M); t++) step(1'b0, {$urandom, $urandom});
    checks++;
    if (seeded != 2 * int'(M) || iterated == 0) begin failures++; $display("seeding count wrong"); end
    $display("seeded %0d words, iterated %0d words", seeded, iterated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
