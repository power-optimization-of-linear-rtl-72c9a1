// lp_bist_top -- low-power BIST wrapper around an external circuit under
// test (CUT).
//
// Blocks and data flow:
//   bcu          BIST controller, started by test_mode (Normal/Test)
//   lp_lfsr_ctrl phase sequencer: En1/En2/Sle1/Sle2 for T1, Ta, Tb, Tc
//   lp_lfsr      low-power LFSR, one test pattern per clock
//   test_mux     CUT inputs = func_in (normal) or the test pattern (test)
//   misr         compresses the CUT outputs (cut_po) into a signature
//   tra          compares the signature with golden_sig -> go / nogo
// The CUT itself is outside: cut_pi drives its inputs, cut_po returns its
// outputs. The CUT is taken as combinational, so the MISR captures cut_po
// in the same clock as the pattern that produced it.
//
// Timing: from test_mode rising, one INIT clock, 4*NUM_PATTERNS RUN clocks
// (NUM_PATTERNS LFSR steps, each with its three intermediate vectors), one
// CHECK clock, then done with go/nogo held until test_mode falls. The
// blocks and their roles follow the BIST architecture and the low-power
// LFSR of the document; widths, polynomial, seed, pattern count and the
// handshake between the blocks are this design's choices. Reset is
// active-low and asynchronous. An assertion checks that no running clock
// changes more than half of the pattern bits.
module lp_bist_top
  import lp_bist_pkg::*;
#(
  parameter int unsigned  W            = WIDTH,
  parameter logic [W-1:0] POLY_TAPS    = TAPS,
  parameter logic [W-1:0] SEED_VAL     = SEED,
  parameter int unsigned  NUM_PATTERNS = 255
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,    // Normal/Test
  input  logic         inj_r,        // injector select R (0 = AND, 1 = OR)
  input  logic [W-1:0] func_in,      // functional chip inputs
  input  logic [W-1:0] golden_sig,   // expected fault-free signature
  output logic [W-1:0] cut_pi,       // to the CUT inputs
  input  logic [W-1:0] cut_po,       // from the CUT outputs
  output logic [W-1:0] tp,           // current test pattern
  output logic [W-1:0] signature,
  output logic [W-1:0] lfsr_state,   // LFSR flip-flops
  output phase_e       phase,        // T1 / Ta / Tb / Tc
  output bcu_state_e   bist_state,
  output logic         done,
  output logic         go,
  output logic         nogo
);

  logic test_sel, init, lfsr_run, misr_en, tra_check, step;
  logic en1, en2, sle1, sle2;
  logic bcu_done, tra_done;

  bcu #(.NUM_PATTERNS(NUM_PATTERNS)) u_bcu (
    .clk, .rst_n, .test_mode, .step,
    .state(bist_state), .test_sel, .init, .lfsr_run, .misr_en,
    .tra_check, .done(bcu_done)
  );

  lp_lfsr_ctrl u_ctrl (
    .clk, .rst_n, .clear(init), .run(lfsr_run),
    .phase, .en1, .en2, .sle1, .sle2, .step
  );

  lp_lfsr #(.W(W), .POLY_TAPS(POLY_TAPS), .SEED_VAL(SEED_VAL)) u_lfsr (
    .clk, .rst_n, .load(init), .seed(SEED_VAL),
    .en1, .en2, .sle1, .sle2, .inj_r,
    .state(lfsr_state), .tp
  );

  test_mux #(.W(W)) u_mux (
    .test_sel, .func_in, .test_in(tp), .cut_in(cut_pi)
  );

  misr #(.W(W), .POLY_TAPS(POLY_TAPS)) u_misr (
    .clk, .rst_n, .clear(init), .en(misr_en), .d(cut_po), .sig(signature)
  );

  tra #(.W(W)) u_tra (
    .clk, .rst_n, .clear(init), .check(tra_check),
    .sig(signature), .golden(golden_sig),
    .done(tra_done), .go, .nogo
  );

  assign done = bcu_done && tra_done;

  // Low-power rule: while the generator runs, one clock never changes more
  // than one half of the pattern bits.
  a_half_switching: assert property (@(posedge clk)
    (lfsr_run && $past(lfsr_run)) |-> ($countones(tp ^ $past(tp)) <= W / 2));

endmodule
