// lp_lfsr -- low-power LFSR (LP-LFSR) test pattern generator datapath.
//
// The LFSR stages are split into a first half (stages 1..WIDTH/2) and a
// second half (stages WIDTH/2+1..WIDTH) with separate load enables en1 and
// en2. Each stage has an injector (rinj) fed with the stage's present and
// next state, and a 2:1 output multiplexer: select 0 passes the flip-flop,
// select 1 passes the injector. sle1 drives the multiplexers of the first
// half, sle2 those of the second half.
//
// Driven by lp_lfsr_ctrl, one LFSR step T1 -> T2 takes four clocks and
// puts out five vectors, T2 being the first of the next step:
//   T1 : both halves show the flip-flops (state T1)
//   Ta : first half shows its injectors, second half stays at T1; en1 = 1
//   Tb : first half now holds T2, second half still T1 (plain flip-flops)
//   Tc : second half shows its injectors, first half stays at T2; en2 = 1
//   T2 : both halves hold the next state
// Every output bit changes at most once on the way from T1 to T2, so the
// five vectors together have as many transitions as T1 -> T2 alone, spread
// over four clocks.
//
// Because the first half loads before the second, the last stage of the
// first half is copied into a boundary flip-flop (hold_q) when en1 loads;
// the second half then shifts that old value in, so the state sequence
// at T1 is exactly that of the conventional LFSR. If en1 and en2 load in
// the same cycle the old stage value is taken directly.
//
// Timing: load (seed) has priority over en1/en2; all registers update on
// the rising clock edge; the pattern output tp is combinational from the
// registers and the select inputs. Reset is active-low, asynchronous,
// and sets the state to SEED. Polynomial, seed, reset and the boundary
// flip-flop are this design's choices; the split, the injectors, the output
// multiplexers and the En1/En2/Sle1/Sle2 controls follow the LP-LFSR drawing.
module lp_lfsr
  import lp_bist_pkg::*;
#(
  parameter int unsigned       W         = WIDTH,
  parameter logic [W-1:0]      POLY_TAPS = TAPS,
  parameter logic [W-1:0]      SEED_VAL  = SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,       // load seed
  input  logic [W-1:0] seed,
  input  logic         en1,        // load first half  (stages 1..W/2)
  input  logic         en2,        // load second half (stages W/2+1..W)
  input  logic         sle1,       // first-half output mux: 1 = injector
  input  logic         sle2,       // second-half output mux: 1 = injector
  input  logic         inj_r,      // injector select R: 0 = AND, 1 = OR
  output logic [W-1:0] state,      // LFSR flip-flops
  output logic [W-1:0] tp          // test pattern to the CUT
);

  localparam int unsigned H = W / 2;

  logic [W-1:0] q;        // LFSR stages
  logic         hold_q;   // old value of stage H, kept for the second half
  logic [W-1:0] d;        // next state of each stage
  logic [W-1:0] inj;      // injector outputs
  logic         fb;

  always_comb begin
    fb       = ^(q & POLY_TAPS);
    d[0]     = fb;
    d[H-1:1] = q[H-2:0];
    d[H]     = en1 ? q[H-1] : hold_q;
    d[W-1:H+1] = q[W-2:H];
  end

  for (genvar i = 0; i < W; i++) begin : g_stage
    rinj u_rinj (.q(q[i]), .d(d[i]), .r(inj_r), .y(inj[i]));
    if (i < H) begin : g_lo
      assign tp[i] = sle1 ? inj[i] : q[i];
    end else begin : g_hi
      assign tp[i] = sle2 ? inj[i] : q[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q      <= SEED_VAL;
      hold_q <= SEED_VAL[H-1];
    end else if (load) begin
      q      <= seed;
      hold_q <= seed[H-1];
    end else begin
      if (en1) begin
        q[H-1:0] <= d[H-1:0];
        hold_q   <= q[H-1];
      end
      if (en2) begin
        q[W-1:H] <= d[W-1:H];
      end
    end
  end

  assign state = q;

endmodule
