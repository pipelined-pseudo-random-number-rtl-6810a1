// pipe_square: pipelined squarer for unsigned fractions, the (x*x) block of the
// logistic-map generator.
//
// The operand a is an unsigned fraction a/2^W. The output p is the upper W bits of the
// 2W-bit product a*a, i.e. a^2 in the same format (truncated), delivered LAT clocks after
// a is presented. The full product is formed in one combinational multiplier and then
// passed through LAT registers, leaving the placement of pipeline registers to retiming;
// how the original multiplier was pipelined is not published, only the resulting loop depth.
module pipe_square #(
  parameter int unsigned W   = 64,
  parameter int unsigned LAT = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  output logic [W-1:0] p
);

  logic [2*W-1:0] prod;
  logic [W-1:0]   pipe [LAT];

  assign prod = {{W{1'b0}}, a} * {{W{1'b0}}, a};

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(LAT); k++) pipe[k] <= '0;
    end else begin
      pipe[0] <= prod[2*W-1:W];
      for (int k = 1; k < int'(LAT); k++) pipe[k] <= pipe[k-1];
    end
  end

  assign p = pipe[LAT-1];

  initial assert (LAT >= 1) else $error("pipe_square: LAT must be at least 1");

endmodule
