// pp_xor_rot: the XOR / rotate / feedback post-processing of a pipelined chaotic generator.
//
// Each clock the output register takes
//     Q <= X_i ^ rotl(X_{i-1}, RL) ^ rotl(X_{i-2}, 2*RL) ^ rotl(Q, 3*RL),   RL = W/4,
// where X_i, X_{i-1}, X_{i-2} are three successive words of the generator's stream. Because
// a pipelined generator holds successive words in neighbouring pipeline registers, all
// three are available in the same clock without extra storage. Rotating by quarter words
// lands the low, high-entropy bits of one word on the high, low-entropy bits of the others,
// so that no bit positions need to be discarded. The equation and RL = W/4 follow the
// published method; rotation (rather than a plain shift) follows its prose description.
//
// Timing: x0..x2 are sampled at a rising edge and their Q appears after that edge. Q is
// cleared by the synchronous active-high reset (reset is this implementation's choice).
module pp_xor_rot #(
  parameter int unsigned W  = 64,
  parameter int unsigned RL = W / 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] x0,   // X_i
  input  logic [W-1:0] x1,   // X_{i-1}
  input  logic [W-1:0] x2,   // X_{i-2}
  output logic [W-1:0] q
);

  localparam int unsigned R1 = RL % W;
  localparam int unsigned R2 = (2 * RL) % W;
  localparam int unsigned R3 = (3 * RL) % W;

  logic [W-1:0] q_next;

  // Rotate left by a constant amount 0 <= r < W (a shift by W yields 0, so r = 0 is safe).
  function automatic logic [W-1:0] rotl(input logic [W-1:0] v, input int unsigned r);
    return (v << r) | (v >> (W - r));
  endfunction

  always_comb begin
    q_next = x0 ^ rotl(x1, R1) ^ rotl(x2, R2) ^ rotl(q, R3);
  end

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= q_next;
  end

endmodule
