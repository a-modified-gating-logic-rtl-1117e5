// drc_pkg: types shared by the double rank counter.
//
// A double rank counter keeps each binary digit in two flip-flops, a true
// rank T and a false rank F, and counts by copying between them with two
// pulses per count: a down pulse (T to F) and an up pulse (F to T). One of
// the two copies is made in complement form. Which copy is complemented, and
// which copy is the one gated by the carry condition, is the "gating
// arrangement":
//
//   GATING_3      up:   F -c-> T in every stage, in parallel
//                 down: T -d-> F in stage i when T(i-1..0) are all 1
//                 (the main arrangement; the false rank holds ~T and counts down)
//   GATING_4      up:   F -d-> T in every stage, in parallel
//                 down: T -c-> F in stage i when T(i-1..0) are all 1
//                 (the false rank holds T+1)
//   GATING_5      down: T -c-> F in every stage, in parallel
//                 up:   F -d-> T in stage i when F(i-1..0) are all 0
//                 (the count is made by the up pulse; used to start from a
//                 number gated into the true rank)
//   GATING_MIXED  each stage uses the GATING_3 or the GATING_4 form, chosen
//                 per stage; the true rank still counts, the false rank no
//                 longer follows a binary sequence.
//
// The arrangements are those of the original gating rules; the enum encodings
// are this design's own.
package drc_pkg;

  typedef enum logic [1:0] {
    GATING_3     = 2'd0,
    GATING_4     = 2'd1,
    GATING_5     = 2'd2,
    GATING_MIXED = 2'd3
  } gating_e;

  // Transfer mode of one digit stage.
  typedef enum logic [1:0] {
    STAGE_UP_CPL = 2'd0,  // up: F -c-> T (parallel); down: T -d-> F (gated)
    STAGE_DN_CPL = 2'd1,  // up: F -d-> T (parallel); down: T -c-> F (gated)
    STAGE_SWAP   = 2'd2   // down: T -c-> F (parallel); up: F -d-> T (gated)
  } stage_mode_e;

endpackage
