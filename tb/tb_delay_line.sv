// tb_delay_line: drives random words into a 3-stage delay line and checks that every tap
// shows the input from exactly k+1 clocks earlier, including zeros right after reset.
module tb_delay_line;
  localparam int unsigned W = 16;
  localparam int unsigned N = 3;

  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] d;
  logic [W-1:0] taps [N];
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  delay_line #(.W(W), .N(N)) dut (.clk, .rst, .d, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < int'(N); k++) hist.push_front('0);   // stages are cleared by reset
    for (int t = 0; t < 500; t++) begin
      d = W'($urandom);
      @(posedge clk); #1;
      hist.push_front(d);
      for (int k = 0; k < int'(N); k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin
          failures++;
          if (failures < 10) $display("t=%0d tap %0d: got %h expected %h", t, k, taps[k], hist[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
