// tb_prbg_precisions: runs every precision the generators were evaluated at, side by side:
// logistic map with 48-bit arithmetic (8-deep loop) and 64-bit (13-deep), FDNR oscillator with
// 32-, 48- and 64-bit arithmetic (4-deep loop). Each configuration is checked word by word
// against the testbench's model by its own checker; the result sums them.
module tb_prbg_precisions;
  logic clk = 1'b0;
  logic done [5];
  int   c [5], f [5];
  int   checks, failures;

  log_gen_check #(.P(48), .M(8))  u_log48 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  log_gen_check #(.P(64), .M(13)) u_log64 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  osc_gen_check #(.P(32))         u_osc32 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  osc_gen_check #(.P(48))         u_osc48 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));
  osc_gen_check #(.P(64))         u_osc64 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]));

  always #5 clk = ~clk;

  function automatic void total();
    checks = 0; failures = 0;
    for (int k = 0; k < 5; k++) begin checks += c[k]; failures += f[k]; end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
