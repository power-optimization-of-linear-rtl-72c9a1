// lp_bist_pkg -- constants and types shared by the low-power BIST blocks.
//
// The generator is an 8-stage Fibonacci LFSR: stage 1 takes the XOR of the
// tap stages, every other stage takes the stage before it. Bit i of a state
// vector is stage i+1, so the shift is towards the MSB and the feedback
// enters at bit 0. The eight stages follow the low-power LFSR drawing; the
// characteristic polynomial x^8+x^6+x^5+x^4+1 (taps at stages 8, 6, 5, 4,
// a maximal-length choice) is this design's own, as is the seed.
//
// The MISR uses the same polynomial: it shifts like the LFSR and XORs the
// parallel response word into the shifted state.
package lp_bist_pkg;

  // Generator width (stages). The two halves are WIDTH/2 stages each.
  localparam int unsigned WIDTH = 8;

  // Tap mask: bit i set means stage i+1 feeds the XOR (stages 8, 6, 5, 4).
  localparam logic [WIDTH-1:0] TAPS = 8'b1011_1000;

  // Default seed (any non-zero value).
  localparam logic [WIDTH-1:0] SEED = 8'h01;

  // Output phase of the low-power LFSR: the state itself (T1), then the
  // three intermediate vectors Ta, Tb, Tc before the next state (T2).
  typedef enum logic [1:0] {
    PH_T1 = 2'd0,
    PH_TA = 2'd1,
    PH_TB = 2'd2,
    PH_TC = 2'd3
  } phase_e;

  // BIST controller states.
  typedef enum logic [2:0] {
    BCU_NORMAL = 3'd0,
    BCU_INIT   = 3'd1,
    BCU_RUN    = 3'd2,
    BCU_CHECK  = 3'd3,
    BCU_DONE   = 3'd4
  } bcu_state_e;

endpackage
