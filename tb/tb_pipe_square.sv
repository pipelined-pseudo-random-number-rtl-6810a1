// tb_pipe_square: feeds a random operand every clock into the 64-bit squarer with an
// 11-clock latency and checks that, exactly 11 clocks later, the output equals the upper
// half of the 128-bit square computed by the testbench. Edge operands (0, 1, all ones,
// one half) are included.
module tb_pipe_square;
  localparam int unsigned W   = 64;
  localparam int unsigned LAT = 11;

  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] a, p;
  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];

  pipe_square #(.W(W), .LAT(LAT)) dut (.clk, .rst, .a, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] full;
    logic [W-1:0] exp_p;
    rst = 1'b1; a = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < int'(LAT) - 1; k++) sent.push_back('0);
    for (int t = 0; t < 1000; t++) begin
      case (t)
        0: a = '0;
        1: a = 64'd1;
        2: a = '1;
        3: a = 64'h8000_0000_0000_0000;
        default: a = {$urandom, $urandom};
      endcase
      @(posedge clk); #1;
      sent.push_back(a);
      // after this edge, p shows the square of the operand sampled LAT-1 edges earlier
      // (LAT register stages, the first of which samples at this edge)
      full  = 128'(sent[0]) * 128'(sent[0]);
      exp_p = full[127:64];
      void'(sent.pop_front());
      checks++;
      if (p !== exp_p) begin
        failures++;
        if (failures < 10) $display("t=%0d got %h expected %h", t, p, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
