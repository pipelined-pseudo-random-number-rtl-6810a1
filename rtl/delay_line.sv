// delay_line: a z^-N shift register with every stage brought out.
//
// taps[0] is the input delayed by one clock, taps[N-1] the input delayed by N clocks.
// It is the "D" delay of the logistic generator and the pDelayS delays of the FDNR
// generator; exposing every stage lets the post-processing read the word that is one
// clock older than the main state register. A synchronous active-high reset clears
// all stages (reset is this implementation's choice).
module delay_line #(
  parameter int unsigned W = 64,
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] taps [N]
);

  logic [W-1:0] stage [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(N); k++) stage[k] <= '0;
    end else begin
      stage[0] <= d;
      for (int k = 1; k < int'(N); k++) stage[k] <= stage[k-1];
    end
  end

  assign taps = stage;

  initial assert (N >= 1) else $error("delay_line: N must be at least 1");

endmodule
