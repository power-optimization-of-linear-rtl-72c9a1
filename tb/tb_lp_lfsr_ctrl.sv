// tb_lp_lfsr_ctrl -- checks the phase sequencer: the phase order T1, Ta,
// Tb, Tc, the decode of en1/sle1 (Ta) and en2/sle2/step (Tc), one step
// pulse every four clocks while running, no advance while run is low, and
// restart at T1 on clear.
module tb_lp_lfsr_ctrl;
  import lp_bist_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, run = 0;
  phase_e phase;
  logic en1, en2, sle1, sle2, step;
  int checks = 0, failures = 0;

  lp_lfsr_ctrl dut (.clk, .rst_n, .clear, .run, .phase, .en1, .en2,
                    .sle1, .sle2, .step);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (phase=%0d en1=%0b en2=%0b sle1=%0b sle2=%0b step=%0b)",
               what, phase, en1, en2, sle1, sle2, step);
    end
  endtask

  initial begin
    int exp_ph, steps, last_step, cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(phase == PH_T1, "reset phase");
    run = 1;
    exp_ph = 0; steps = 0; last_step = -1;
    for (cyc = 0; cyc < 400; cyc++) begin
      #1;
      chk(int'(phase) == exp_ph, "phase order");
      chk(en1 == (exp_ph == 1) && sle1 == (exp_ph == 1), "first-half controls");
      chk(en2 == (exp_ph == 3) && sle2 == (exp_ph == 3), "second-half controls");
      chk(step == (exp_ph == 3), "step");
      if (step) begin
        if (last_step >= 0) chk(cyc - last_step == 4, "step every 4 clocks");
        last_step = cyc;
        steps++;
      end
      @(posedge clk);
      exp_ph = (exp_ph + 1) % 4;
    end
    chk(steps == 100, "100 steps in 400 clocks");
    // run low: no advance, no load enables
    #1 run = 0;
    exp_ph = int'(phase);
    repeat (5) begin
      @(posedge clk); #1;
      chk(int'(phase) == exp_ph, "hold while not running");
      chk(!en1 && !en2 && !step, "no enables while not running");
    end
    // clear
    run = 1;
    while (phase != PH_TB) @(posedge clk);
    #1 clear = 1;
    @(posedge clk); #1 clear = 0;
    chk(phase == PH_T1, "clear returns to T1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
