// fcrra_bus_arbiter -- fair chance bus arbiter (FCBA) for N requesters.
//
// A ring counter holds a one-hot token. There are N priority logic blocks;
// block k gives request k the highest priority and the others follow in
// circular order (k+1, k+2, ... k-1). Only the block whose token bit is set is
// enabled, so the grant is that block's output: the token holder wins if it
// requests, otherwise the next requester after it in circular order. The
// outputs of the N blocks are ORed together, which is exact because at most
// one block is enabled. Every enabled cycle the token passes to the next
// position, whether or not its holder was granted, so a request that stays
// high is granted within N-1 cycles at most (it gets the token by then).
//
// Interface: clk, rst_n (asynchronous, active low), en, req[N-1:0] in;
// gnt[N-1:0] (one-hot or zero) and token[N-1:0] out.
// Timing: gnt is combinational from req, en and the token register, i.e.
// the request is granted in the cycle it is presented. With en low nothing
// is granted and the token does not move.
//
// The structure (token ring, rotated priority blocks, enable by token, token
// passed each cycle) follows the arbiter's description. The en input and the
// choice that the token also moves in cycles with no request are this
// design's own.
module fcrra_bus_arbiter #(
  parameter int unsigned N = fcrra_pkg::FCBA_REQS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic [N-1:0] token
);

  logic [N-1:0] blk_gnt [N];

  fcrra_ring_counter #(.N(N)) u_ring (
    .clk     (clk),
    .rst_n   (rst_n),
    .advance (en),
    .token   (token)
  );

  for (genvar k = 0; k < N; k++) begin : g_prio
    fcrra_priority_logic #(.N(N), .HIGH(k)) u_prio (
      .en  (en & token[k]),
      .req (req),
      .gnt (blk_gnt[k])
    );
  end

  always_comb begin
    gnt = '0;
    for (int unsigned k = 0; k < N; k++) gnt |= blk_gnt[k];
  end

  // A grant goes to one requester at most, and only to one that asked.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("more than one grant: %b", gnt);
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0)
    else $error("grant without request: gnt=%b req=%b", gnt, req);
  // Work conserving: an enabled cycle with any request grants someone.
  assert property (@(posedge clk) disable iff (!rst_n) (en && req != '0) |-> gnt != '0)
    else $error("requests left idle: req=%b", req);

endmodule
