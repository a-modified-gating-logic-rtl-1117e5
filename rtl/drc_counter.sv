// drc_counter: N-stage double rank counter with carry gating ahead of the
// counting pulse.
//
// Each digit is held in a true-rank and a false-rank flip-flop (drc_stage).
// In the default arrangement (GATING_3) a count takes two pulses:
//   dn : stage i copies T(i) into F(i) directly, but only if T(i-1..0) are
//        all 1. The permission reaches stage i through a chain of AND gates
//        (one per stage) that is settled by the true rank before the pulse
//        comes, so no stage waits for a lower flip-flop to switch. After dn
//        the false rank holds ~(T+1): the count has been made.
//   up : every stage copies ~F(i) into T(i) at once, so T becomes T+1 and the
//        false rank again holds ~T.
// The true rank therefore counts up and the false rank, between pulses,
// counts down from all ones: one counter serves additive and subtractive
// counting. After the pair dn, up the counter has advanced by one; it wraps
// from 2**N-1 to 0, and carry_out is high during the dn pulse that causes
// the wrap (the gated pulse that would go to a stage N).
//
// Other arrangements, chosen by GATING (see drc_pkg): GATING_4 complements on
// the down copy instead (false rank holds T+1 after dn); GATING_5 copies
// T -> ~F on dn in parallel and makes the count on up, gated by F(i-1..0)
// all 0; GATING_MIXED chooses the GATING_3 or GATING_4 form per stage from
// MIXED_UP_CPL (bit i = 1: GATING_3 form).
//
// Starting from a predetermined number: load gates preset in one cycle.
// Under GATING_3/4/MIXED it goes into the false rank, complemented in
// GATING_3-form stages and true in GATING_4-form stages; counting then
// starts with an up pulse, which makes the true rank equal to the word
// loaded. To start the count at P the caller loads P+1, or loads P and
// applies one dn, up pair. Under GATING_5 preset goes into the true rank as
// it is and counting starts with a dn pulse.
//
// The gating rules, the preset forms and N = 4 follow the original design.
// Clocked flip-flops with one-cycle pulse enables, the asynchronous reset
// (count 0), load priority and the assertions are this design's own.
//
// Interface: up, dn and load are one-cycle enables sampled on the rising
// edge of clk; they must not coincide. true_rank and false_rank change one
// edge after a pulse. carry_out is combinational.
module drc_counter
  import drc_pkg::*;
#(
  parameter int unsigned N            = 4,
  parameter gating_e     GATING       = GATING_3,
  parameter logic [N-1:0] MIXED_UP_CPL = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         up,
  input  logic         dn,
  input  logic         load,
  input  logic [N-1:0] preset,
  output logic [N-1:0] true_rank,
  output logic [N-1:0] false_rank,
  output logic         carry_out
);

  localparam bit SWAPPED = (GATING == GATING_5);

  // The pulse every stage sees at once, and the one sent up the carry chain.
  logic par_pulse, chain_pulse;
  assign par_pulse   = SWAPPED ? dn : up;
  assign chain_pulse = SWAPPED ? up : dn;

  logic [N:0] carry;  // carry[i] enters stage i
  assign carry[0]  = chain_pulse;
  assign carry_out = carry[N];

  for (genvar i = 0; i < N; i++) begin : g_stage
    localparam stage_mode_e MODE =
        (GATING == GATING_5)     ? STAGE_SWAP :
        (GATING == GATING_4)     ? STAGE_DN_CPL :
        (GATING == GATING_MIXED) ? (MIXED_UP_CPL[i] ? STAGE_UP_CPL : STAGE_DN_CPL) :
                                   STAGE_UP_CPL;

    // Preset form: complement into F for complemented-up stages, true form
    // into F for complemented-down stages, true form into T when swapped.
    logic preset_bit;
    assign preset_bit = (MODE == STAGE_UP_CPL) ? ~preset[i] : preset[i];

    drc_stage #(.MODE(MODE)) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .par_pulse (par_pulse),
      .carry_in  (carry[i]),
      .carry_out (carry[i+1]),
      .load_t    (load & SWAPPED),
      .load_f    (load & ~SWAPPED),
      .preset_bit(preset_bit),
      .t_q       (true_rank[i]),
      .f_q       (false_rank[i])
    );
  end

  // Pulse discipline: a count is a sequence of separate pulses.
  a_pulses_apart : assert property (@(posedge clk) !(up && dn))
    else $error("up and dn pulses coincide");
  a_load_alone : assert property (@(posedge clk) !(load && (up || dn)))
    else $error("load coincides with a counting pulse");

endmodule
