// fcrra_ring_counter -- token ring of the fair chance round robin arbiter.
//
// Holds a one-hot token of N bits. Bit i set means request i has the highest
// priority in the current cycle. On a clock edge with advance high the token
// moves from position i to position i+1, and from N-1 back to 0; with advance
// low it stays where it is.
//
// Interface: clk, rst_n (asynchronous, active low), advance, token[N-1:0].
// Timing: token is a register output; it changes one edge after advance.
//
// The token ring itself is part of the arbiter's description; the reset
// value (token at position 0) and the advance input are choices of this
// design.
module fcrra_ring_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,
  output logic [N-1:0] token
);

  logic [N-1:0] token_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      token_q <= N'(1);
    end else if (advance) begin
      token_q <= (token_q << 1) | (token_q >> (N - 1));
    end
  end

  assign token = token_q;

  // The token must never be lost or duplicated.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot(token_q))
    else $error("ring counter token is not one-hot: %b", token_q);

endmodule
