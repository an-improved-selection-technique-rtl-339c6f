// cagis_arbiter: contention-age input selection for one output channel.
//
// The CAGIS proposal flattens the input channels that contend for one output
// into a single set and arranges them as a treap: contention level (CL) is
// the search key and AGE (lost competitions) the heap priority. The channel
// at the root of the treap, the one with the highest AGE, is granted. The
// treap is built each cycle by treap_builder over the requesting channels,
// and the grant is its root. The rest of the tree is left unused.
//
// Ties are resolved by the treap_builder tie-break. This is this design's
// choice, since the treap procedures keep whichever equal-priority node was
// inserted first. Among channels with equal AGE the higher CL wins, so a
// first attempt (all ages zero) behaves like plain contention-aware
// selection. Among channels equal in both, the lowest index wins.
//
// Purely combinational: grant is one-hot over the N inputs, or zero when
// nothing is requested.
module cagis_arbiter #(
  parameter int unsigned N     = 5,
  parameter int unsigned CL_W  = 3,
  parameter int unsigned AGE_W = 4
) (
  input  logic [N-1:0]            req,
  input  logic [N-1:0][CL_W-1:0]  cl,
  input  logic [N-1:0][AGE_W-1:0] age,
  output logic [N-1:0]            grant
);

  treap_builder #(.N(N), .KEY_W(CL_W), .PRI_W(AGE_W)) u_treap (
    .valid      (req),
    .key        (cl),
    .pri        (age),
    .root       (grant),
    .has_parent (),
    .parent     (),
    .has_left   (),
    .left       (),
    .has_right  (),
    .right      ()
  );

endmodule
