// drc_stage: one digit stage of a double rank counter.
//
// The stage holds one bit twice: a true-rank flip-flop t_q and a false-rank
// flip-flop f_q. Two pulses move information between them. One pulse,
// par_pulse, reaches every stage at once and makes its transfer
// unconditionally. The other arrives as carry_in, already gated by all lower
// stages, and makes the other transfer; the stage passes it on as carry_out
// only when its own carry condition holds. The carry thus runs through a
// chain of AND gates outside the flip-flops, set up by the ranks before the
// pulse arrives, instead of rippling from flip-flop to flip-flop.
//
//   MODE          par_pulse is   parallel xfer   carry_in xfer   carry_out
//   STAGE_UP_CPL  up pulse       t <= ~f         f <=  t         carry_in & t
//   STAGE_DN_CPL  up pulse       t <=  f         f <= ~t         carry_in & t
//   STAGE_SWAP    down pulse     f <= ~t         t <=  f         carry_in & ~f
//
// STAGE_UP_CPL is the main arrangement; STAGE_DN_CPL is the reversed one;
// STAGE_SWAP interchanges the roles of the ranks so that the count is made
// by the up pulse. These three follow the original gating rules, as does the
// carry gate. This design's own choices: the pulses are one-cycle enables
// sampled on the rising edge of clk, reset is asynchronous and active low,
// and a load (load_t / load_f gating preset_bit into a rank) takes priority
// over a pulse in the same cycle.
//
// Reset leaves the true rank at 0 and the false rank as it stands after an
// up pulse: ~t for STAGE_UP_CPL and STAGE_SWAP, t for STAGE_DN_CPL.
//
// Timing: t_q and f_q change one clock edge after the enabling pulse;
// carry_out is combinational from carry_in and the stage's flip-flops.
module drc_stage
  import drc_pkg::*;
#(
  parameter stage_mode_e MODE = STAGE_UP_CPL
) (
  input  logic clk,
  input  logic rst_n,
  input  logic par_pulse,
  input  logic carry_in,
  output logic carry_out,
  input  logic load_t,
  input  logic load_f,
  input  logic preset_bit,
  output logic t_q,
  output logic f_q
);

  localparam logic F_RESET = (MODE == STAGE_DN_CPL) ? 1'b0 : 1'b1;

  // Per-mode view of the two transfers: which pulse sets each rank, and with
  // what value.
  logic t_en, f_en;
  logic t_d, f_d;

  always_comb begin
    unique case (MODE)
      STAGE_UP_CPL: begin
        t_en = par_pulse;  t_d = ~f_q;
        f_en = carry_in;   f_d =  t_q;
      end
      STAGE_DN_CPL: begin
        t_en = par_pulse;  t_d =  f_q;
        f_en = carry_in;   f_d = ~t_q;
      end
      default: begin  // STAGE_SWAP
        t_en = carry_in;   t_d =  f_q;
        f_en = par_pulse;  f_d = ~t_q;
      end
    endcase
  end

  // Carry gate to the next stage.
  assign carry_out = (MODE == STAGE_SWAP) ? (carry_in & ~f_q) : (carry_in & t_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q <= 1'b0;
    end else if (load_t) begin
      t_q <= preset_bit;
    end else if (t_en) begin
      t_q <= t_d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q <= F_RESET;
    end else if (load_f) begin
      f_q <= preset_bit;
    end else if (f_en) begin
      f_q <= f_d;
    end
  end

endmodule
