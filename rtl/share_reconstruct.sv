// share_reconstruct: the master's reconstruction of one sub-circuit's
// result from the shares of its three mini-circuits.
//
// Mini-circuit j returns (s0, s1) = (alpha'_j, x'_(j-1)). Three values are
// rebuilt, each from two mini-circuits: o1 = sh[0].s0 ^ sh[1].s1,
// o2 = sh[1].s0 ^ sh[2].s1, o3 = sh[2].s0 ^ sh[0].s1. If all three agree,
// out = o1 and mismatch = 0; otherwise mismatch = 1 (the error status of the
// protocol) and out still shows o1. Purely combinational.
module share_reconstruct
  import tr_pkg::*;
(
  input  share_t sh [3],
  output word_t  out,
  output logic   mismatch
);

  word_t o1, o2, o3;

  assign o1 = sh[0].s0 ^ sh[1].s1;
  assign o2 = sh[1].s0 ^ sh[2].s1;
  assign o3 = sh[2].s0 ^ sh[0].s1;

  assign out      = o1;
  assign mismatch = (o1 != o2) || (o2 != o3);

endmodule
