// log_gen_check: self-contained check of one prng_log_pipelined configuration, for use inside
// a testbench that sweeps sizes. It resets and seeds the generator with M random words, runs it
// for STEPS clocks and compares out_q after every clock with its own model (seed, or the
// logistic map of the word M positions earlier, then the XOR/rotate post-processing).
// done rises when it has finished; checks and failures count the comparisons.
module log_gen_check #(
  parameter int unsigned P     = 48,
  parameter int unsigned M     = 8,
  parameter int          STEPS = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import prbg_ref_pkg::*;

  logic         rst, init_select;
  logic [P-1:0] init_x, out_q;
  word_t hist [$];
  word_t q_ref;

  prng_log_pipelined #(.P_ARITH(P), .PIPE_DEPTH(M)) dut (.clk, .rst, .init_select, .init_x, .out_q);

  function automatic word_t h(input int n);
    return (n < 0) ? '0 : hist[n];
  endfunction

  initial begin
    word_t w;
    int n;
    done = 1'b0; checks = 0; failures = 0; q_ref = '0;
    rst = 1'b1; init_select = 1'b0; init_x = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < STEPS; t++) begin
      n = hist.size();
      init_select = (t < int'(M));
      init_x = P'({$urandom, $urandom});
      w = init_select ? word_t'(init_x) : log_step(h(n - int'(M)), P);
      hist.push_back(w);
      q_ref = pp_step(w, h(n - 1), h(n - 2), q_ref, P);
      @(posedge clk); #1;
      checks++;
      if (word_t'(out_q) !== q_ref) begin
        failures++;
        if (failures < 5) $display("logistic P=%0d M=%0d n=%0d: got %h expected %h", P, M, n, out_q, q_ref);
      end
    end
    done = 1'b1;
  end
endmodule
