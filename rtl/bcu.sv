// bcu -- BIST controller unit.
//
// A five-state machine started by the Normal/Test input:
//   NORMAL : test_sel = 0, the CUT sees its functional inputs.
//   INIT   : one clock; loads the generator seed, clears the MISR, the
//            analyzer and the phase sequencer; test_sel = 1 from here on.
//   RUN    : the generator runs (lfsr_run) and the MISR takes one response
//            per clock (misr_en). Each step pulse (one finished LFSR step,
//            four clocks) is counted; after NUM_PATTERNS steps -> CHECK.
//   CHECK  : one clock; tells the analyzer to compare the signature.
//   DONE   : done = 1 until test_mode falls, then back to NORMAL.
// Dropping test_mode in INIT or RUN aborts to NORMAL. A run of
// NUM_PATTERNS steps applies 4*NUM_PATTERNS vectors and lasts
// done rises on the (4*NUM_PATTERNS+3)-th clock edge that sees test_mode
// high. The document says the
// controller is activated by the Normal/Test signal, manages the generator
// and the analyzer, reconfigures the multiplexer and yields Go/No go; the
// states, the pattern count (default 255, one full period of the 8-stage
// LFSR) and the timing are this design's own. Reset is active-low and
// asynchronous.
module bcu
  import lp_bist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 255
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       test_mode,   // Normal/Test: 1 = run the self-test
  input  logic       step,        // one LFSR step finished
  output bcu_state_e state,
  output logic       test_sel,    // input multiplexer: 1 = test patterns
  output logic       init,        // seed load / clear pulse
  output logic       lfsr_run,
  output logic       misr_en,
  output logic       tra_check,
  output logic       done
);

  localparam int unsigned CW = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1;

  bcu_state_e state_q, state_d;
  logic [CW-1:0] cnt_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      BCU_NORMAL: if (test_mode) state_d = BCU_INIT;
      BCU_INIT:   state_d = test_mode ? BCU_RUN : BCU_NORMAL;
      BCU_RUN: begin
        if (!test_mode)
          state_d = BCU_NORMAL;
        else if (step && cnt_q == CW'(NUM_PATTERNS - 1))
          state_d = BCU_CHECK;
      end
      BCU_CHECK:  state_d = BCU_DONE;
      BCU_DONE:   if (!test_mode) state_d = BCU_NORMAL;
      default:    state_d = BCU_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= BCU_NORMAL;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == BCU_INIT)                 cnt_q <= '0;
      else if (state_q == BCU_RUN && step)     cnt_q <= cnt_q + 1'b1;
    end
  end

  always_comb begin
    test_sel  = (state_q != BCU_NORMAL);
    init      = (state_q == BCU_INIT);
    lfsr_run  = (state_q == BCU_RUN) && test_mode;
    misr_en   = lfsr_run;
    tra_check = (state_q == BCU_CHECK);
    done      = (state_q == BCU_DONE);
  end

  assign state = state_q;

endmodule
