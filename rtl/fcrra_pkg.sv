// fcrra_pkg -- constants shared by the fair chance round robin arbiter.
//
// FCBA_REQS is the number of requesters of one bus arbiter block (four), and
// FCRRA_GROUPS the number of such blocks working in parallel in the
// 8-request arbiter (two).
package fcrra_pkg;

  localparam int unsigned FCBA_REQS    = 4;
  localparam int unsigned FCRRA_GROUPS = 2;

endpackage
