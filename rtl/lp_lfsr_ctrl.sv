// lp_lfsr_ctrl -- phase sequencer for the low-power LFSR.
//
// A two-bit phase counter walks T1 -> Ta -> Tb -> Tc -> T1 while run is
// high and derives the four control lines of lp_lfsr from it:
//   Ta : sle1 = 1 (first half shows its injectors), en1 = 1 (first half
//        loads at the end of the cycle)
//   Tc : sle2 = 1 (second half shows its injectors), en2 = 1 (second half
//        loads at the end of the cycle)
//   T1, Tb : all zero
// step marks the last cycle of an LFSR step (Tc while running), one pulse
// per four clocks. clear returns the counter to T1. The order of the
// phases follows the generation steps of the low-power LFSR algorithm (first
// half active with the second idle, then the reverse); the counter, the
// decode and the step pulse are this design's own. Outputs are decoded
// from the registered phase, so they change right after the clock edge.
// Reset is active-low and asynchronous. Assertions check that the halves
// never load together and that each loads only while its injectors show.
module lp_lfsr_ctrl
  import lp_bist_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,   // restart at T1
  input  logic   run,     // advance one phase per clock
  output phase_e phase,
  output logic   en1,
  output logic   en2,
  output logic   sle1,
  output logic   sle2,
  output logic   step     // last clock of one LFSR step
);

  phase_e phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phase_q <= PH_T1;
    else if (clear)  phase_q <= PH_T1;
    else if (run)    phase_q <= phase_e'(phase_q + 2'd1);
  end

  always_comb begin
    sle1 = (phase_q == PH_TA);
    sle2 = (phase_q == PH_TC);
    en1  = run && !clear && (phase_q == PH_TA);
    en2  = run && !clear && (phase_q == PH_TC);
    step = en2;
  end

  assign phase = phase_q;

  // The two halves are never loaded in the same clock, and a half is only
  // loaded while its injectors are on the output.
  a_halves_apart: assert property (@(posedge clk)
    !(en1 && en2));
  a_en1_with_sle1: assert property (@(posedge clk)
    en1 |-> sle1);
  a_en2_with_sle2: assert property (@(posedge clk)
    en2 |-> sle2);

endmodule
