// tb_pp_xor_rot: random X_i, X_{i-1}, X_{i-2} every clock into a 64-bit post-processing unit;
// the testbench keeps its own Q and checks the unit's Q after every clock against
// X_i ^ rotl(X_{i-1},16) ^ rotl(X_{i-2},32) ^ rotl(Q,48). Single-bit inputs are used first so
// that a wrong rotation amount or direction shows up directly.
module tb_pp_xor_rot;
  import prbg_ref_pkg::*;
  localparam int unsigned W = 64;

  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] x0, x1, x2, q;
  word_t        q_ref;
  int checks = 0, failures = 0;

  pp_xor_rot #(.W(W)) dut (.clk, .rst, .x0, .x1, .x2, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== q_ref) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, q, q_ref);
    end
  endtask

  initial begin
    rst = 1'b1; x0 = '0; x1 = '0; x2 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    q_ref = '0;
    check("after reset");
    // single bits: bit 0 of X_{i-1} must land on bit 16, of X_{i-2} on bit 32
    x0 = 64'h1; x1 = '0; x2 = '0;
    @(posedge clk); #1; q_ref = pp_step(x0, x1, x2, q_ref, W); check("x0 bit");
    if (q !== 64'h1) begin failures++; $display("Q after x0 bit: %h", q); end
    checks++;
    x0 = '0; x1 = 64'h1;
    @(posedge clk); #1; q_ref = pp_step(x0, x1, x2, q_ref, W); check("x1 bit");
    // Q was 1, rotated by 48 -> bit 48; x1 bit 0 -> bit 16
    checks++;
    if (q !== 64'h0001_0000_0001_0000) begin failures++; $display("Q after x1 bit: %h", q); end
    x1 = '0; x2 = 64'h8000_0000_0000_0000;
    @(posedge clk); #1; q_ref = pp_step(x0, x1, x2, q_ref, W); check("x2 bit");
    for (int t = 0; t < 2000; t++) begin
      x0 = {$urandom, $urandom}; x1 = {$urandom, $urandom}; x2 = {$urandom, $urandom};
      @(posedge clk); #1;
      q_ref = pp_step(x0, x1, x2, q_ref, W);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
