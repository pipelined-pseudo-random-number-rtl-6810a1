// tb_prng_log_pipelined: seeds the 64-bit logistic generator with 13 random words, runs it and
// reseeds it in mid-run. The testbench rebuilds the word stream itself (seed, or the logistic
// map of the word 13 positions earlier) and the post-processed output
// Q' = X_i ^ rotl(X_{i-1},16) ^ rotl(X_{i-2},32) ^ rotl(Q,48), and compares out_q after every
// clock. It also checks the rate: one new output word on every clock once running.
module tb_prng_log_pipelined;
  import prbg_ref_pkg::*;
  localparam int unsigned P = 64;
  localparam int unsigned M = 13;

  logic         clk = 1'b0;
  logic         rst;
  logic         init_select;
  logic [P-1:0] init_x, out_q;
  int checks = 0, failures = 0;
  word_t hist [$];
  word_t q_ref = '0, q_prev;
  int changed = 0, running = 0;

  prng_log_pipelined #(.P_ARITH(P), .PIPE_DEPTH(M)) dut (.clk, .rst, .init_select, .init_x, .out_q);

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

  task automatic step(input logic sel, input word_t seed);
    word_t w;
    int n;
    n = hist.size();
    init_select = sel; init_x = seed;
    w = sel ? seed : log_step(h(n - int'(M)), P);
    hist.push_back(w);
    q_prev = q_ref;
    q_ref  = pp_step(w, h(n - 1), h(n - 2), q_ref, P);
    @(posedge clk); #1;
    checks++;
    if (out_q !== q_ref) begin
      failures++;
      if (failures < 10) $display("n=%0d out_q %h expected %h", n, out_q, q_ref);
    end
    if (!sel) begin
      running++;
      if (out_q != q_prev) changed++;
    end
  endtask

  initial begin
    rst = 1'b1; init_select = 1'b0; init_x = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < int'(M); k++) step(1'b1, {$urandom, $urandom});
    for (int t = 0; t < 150 * int'(M); t++) step(1'b0, '0);
    for (int k = 0; k < int'(M); k++) step(1'b1, {$urandom, $urandom});
    for (int t = 0; t < 50 * int'(M); t++) step(1'b0, '0);
    checks++;
    if (changed != running) begin
      failures++;
      $display("only %0d of %0d clocks produced a new word", changed, running);
    end
    $display("%0d clocks, %0d new output words", running, changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
