// fcrra_priority_logic -- one rotated fixed-priority block of the fair chance
// round robin arbiter.
//
// Request HIGH has the highest priority, then HIGH+1, HIGH+2, ... wrapping
// round to HIGH-1, which has the lowest. When the block is enabled it grants
// the first active request in that order; when it is disabled, or nothing is
// requested, every grant bit is 0. A bus arbiter holds N of these blocks, one
// per starting position, and enables exactly one of them from its token.
//
// Interface: en (this block's token bit), req[N-1:0], gnt[N-1:0].
// Timing: purely combinational, no clock.
//
// The rotated priority order per block follows the arbiter's description;
// the width N is a parameter so that any request count can be built.
module fcrra_priority_logic #(
  parameter int unsigned N    = 4,
  parameter int unsigned HIGH = 0
) (
  input  logic         en,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  always_comb begin
    logic found;
    gnt   = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      if (en && !found && req[(HIGH + k) % N]) begin
        gnt[(HIGH + k) % N] = 1'b1;
        found               = 1'b1;
      end
    end
  end

  initial begin
    assert (HIGH < N) else $error("HIGH (%0d) must be below N (%0d)", HIGH, N);
  end

endmodule
