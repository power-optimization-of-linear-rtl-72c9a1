// tb_switching_activity -- switching at the pattern output of the
// low-power LFSR compared with a conventional LFSR running from the same
// clock, over one full period (255 LFSR steps, 1020 clocks), once with the
// injector in OR mode and once in AND mode.
//
// The conventional generator is a reference model in this testbench (same
// polynomial and seed, one new pattern per clock). Checks:
//   - over 1020 clocks the LP-LFSR output makes exactly as many bit
//     transitions as the conventional LFSR makes over its first 255 clocks
//     (the same 255 patterns), i.e. a quarter of the per-clock activity;
//   - no clock changes more than 4 of the 8 output bits (one half);
//   - the conventional LFSR over the same 1020 clocks switches at least
//     three times as much as the LP-LFSR.
// It prints transitions per clock and the peak for both generators.
module tb_switching_activity;
  import lp_bist_pkg::*;
  localparam int N = 255;
  logic clk = 0, rst_n = 0, load = 0, run = 0, inj_r = 0;
  logic en1, en2, sle1, sle2, step;
  phase_e phase;
  logic [7:0] state, tp;
  int checks = 0, failures = 0;

  lp_lfsr_ctrl u_ctrl (.clk, .rst_n, .clear(load), .run, .phase, .en1, .en2,
                       .sle1, .sle2, .step);
  lp_lfsr u_lfsr (.clk, .rst_n, .load, .seed(8'h01), .en1, .en2, .sle1,
                  .sle2, .inj_r, .state, .tp);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [7:0] conv_next(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      int lp_tr, lp_peak, conv_tr, conv_tr_255, conv_peak, t;
      logic [7:0] prev_lp, conv, conv_prev;
      inj_r = 1'(mode == 0);
      load = 1;
      @(posedge clk); #1 load = 0;
      run = 1;
      #1;
      prev_lp = tp;
      conv = 8'h01;
      lp_tr = 0; lp_peak = 0; conv_tr = 0; conv_tr_255 = 0; conv_peak = 0;
      for (int c = 0; c < 4 * N; c++) begin
        @(posedge clk); #1;
        t = $countones(tp ^ prev_lp);
        lp_tr += t;
        if (t > lp_peak) lp_peak = t;
        prev_lp = tp;
        conv_prev = conv;
        conv = conv_next(conv);
        t = $countones(conv ^ conv_prev);
        conv_tr += t;
        if (c < N) conv_tr_255 += t;
        if (t > conv_peak) conv_peak = t;
      end
      run = 0;
      $display("R=%0d: LP-LFSR %0d transitions in %0d clocks (%0.3f per clock, peak %0d); conventional %0d (%0.3f per clock, peak %0d); same 255 patterns conventional: %0d",
               inj_r, lp_tr, 4 * N, real'(lp_tr) / (4 * N), lp_peak,
               conv_tr, real'(conv_tr) / (4 * N), conv_peak, conv_tr_255);
      chk(tp == 8'h01, "LP-LFSR back at the seed after one period");
      chk(lp_tr == conv_tr_255, "same transitions for the same 255 patterns");
      chk(lp_peak <= 4, "at most one half switches per clock");
      chk(conv_tr >= 3 * lp_tr, "conventional switches at least 3x per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
