// fcrra_8x8 -- 8-request fair chance round robin arbiter made of two
// 4-request fair chance bus arbiters working side by side.
//
// Request lines are split into groups of GROUP_REQS: group g owns
// req[g*GROUP_REQS +: GROUP_REQS] and drives the matching grant lines. The
// sel input picks the one group that is arbitrated in this cycle; only that
// group's bus arbiter is enabled, so only it can grant and only its token
// moves on. Inside the group the grant follows the group's token: the token
// holder if it requests, else the next requester in circular order. The en
// input gates everything: with en low there is no grant and no token moves.
//
// With the defaults (two groups of four) this is the truth table
//   en=0            -> gnt = 0
//   en=1, sel=0     -> gnt[3:0] = round robin over req[3:0], gnt[7:4] = 0
//   en=1, sel=1     -> gnt[7:4] = round robin over req[7:4], gnt[3:0] = 0
//
// Interface: clk, rst_n (asynchronous, active low), en, sel, req in; gnt out
// (one-hot or zero) and token out (the tokens of all groups side by side, one
// bit set per group, for observation). Timing: gnt is combinational from the inputs and the
// token registers, so a request is answered in the cycle it is presented.
//
// Two 4-request blocks in parallel and a select that chooses between them
// follow the arbiter's description. Reading the enable column as a global
// gate, taking sel from outside, and freezing the token of the group that
// is not selected are this design's choices.
module fcrra_8x8 #(
  parameter int unsigned GROUP_REQS = fcrra_pkg::FCBA_REQS,
  parameter int unsigned GROUPS     = fcrra_pkg::FCRRA_GROUPS,
  localparam int unsigned M         = GROUP_REQS * GROUPS,
  localparam int unsigned SELW      = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [SELW-1:0] sel,
  input  logic [M-1:0]    req,
  output logic [M-1:0]    gnt,
  output logic [M-1:0]    token
);

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    logic grp_en;

    assign grp_en = en && (sel == SELW'(g));

    fcrra_bus_arbiter #(.N(GROUP_REQS)) u_fcba (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (grp_en),
      .req   (req[g*GROUP_REQS +: GROUP_REQS]),
      .gnt   (gnt[g*GROUP_REQS +: GROUP_REQS]),
      .token (token[g*GROUP_REQS +: GROUP_REQS])
    );
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("more than one grant: %b", gnt);
  assert property (@(posedge clk) disable iff (!rst_n) !en |-> gnt == '0)
    else $error("grant while disabled: %b", gnt);

endmodule
