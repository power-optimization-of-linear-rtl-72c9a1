// tb_lp_lfsr -- checks the low-power LFSR datapath with the control lines
// driven directly by the testbench, four clocks per LFSR step.
// A reference Fibonacci LFSR (taps at stages 8, 6, 5, 4) predicts T1 and
// T2; the testbench checks every output vector: T1, Ta = {T1 high half,
// injected low half}, Tb = {T1 high half, T2 low half}, Tc = {injected high
// half, T2 low half}, with the injector rule applied bit by bit. It also
// checks that the transitions over T1, Ta, Tb, Tc, T2 add up to those of
// T1 -> T2, that the state sequence has period 255, that a seed load works
// and that loading both halves in one clock makes a plain LFSR step.
module tb_lp_lfsr;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic load = 0, en1 = 0, en2 = 0, sle1 = 0, sle2 = 0, inj_r = 0;
  logic [W-1:0] seed = '0, state, tp;
  int checks = 0, failures = 0;

  lp_lfsr dut (.clk, .rst_n, .load, .seed, .en1, .en2, .sle1, .sle2,
               .inj_r, .state, .tp);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_next(logic [W-1:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic logic [W-1:0] inj(logic [W-1:0] a, logic [W-1:0] b, logic r);
    return r ? (a | b) : (a & b);
  endfunction

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  task automatic set_ctrl(logic e1, logic e2, logic s1, logic s2);
    en1 = e1; en2 = e2; sle1 = s1; sle2 = s2;
  endtask

  initial begin
    logic [W-1:0] t1, t2, ta, tb, tc, iv;
    int trans_path, trans_direct, period;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // after reset the state is the default seed
    expect_eq("reset seed", state, 8'h01);

    t1 = 8'h01;
    period = 0;
    for (int s = 0; s < 300; s++) begin
      inj_r = 1'($urandom);
      t2 = ref_next(t1);
      // T1
      set_ctrl(0, 0, 0, 0); #1;
      expect_eq("T1", tp, t1);
      expect_eq("state", state, t1);
      // Ta: first half injected, en1
      set_ctrl(1, 0, 1, 0); #1;
      iv = inj(t1, t2, inj_r);
      ta = {t1[7:4], iv[3:0]};
      expect_eq("Ta", tp, ta);
      @(posedge clk); #1;
      // Tb
      set_ctrl(0, 0, 0, 0); #1;
      tb = {t1[7:4], t2[3:0]};
      expect_eq("Tb", tp, tb);
      @(posedge clk); #1;
      // Tc: second half injected, en2
      set_ctrl(0, 1, 0, 1); #1;
      tc = {iv[7:4], t2[3:0]};
      expect_eq("Tc", tp, tc);
      @(posedge clk); #1;
      set_ctrl(0, 0, 0, 0); #1;
      expect_eq("T2", tp, t2);
      trans_path = $countones(t1 ^ ta) + $countones(ta ^ tb) +
                   $countones(tb ^ tc) + $countones(tc ^ t2);
      trans_direct = $countones(t1 ^ t2);
      checks++;
      if (trans_path != trans_direct) begin
        failures++;
        $display("FAIL transitions %0d via intermediates vs %0d direct",
                 trans_path, trans_direct);
      end
      if (period == 0 && t2 == 8'h01) period = s + 1;
      t1 = t2;
    end
    checks++;
    if (period != 255) begin
      failures++;
      $display("FAIL period %0d, expected 255", period);
    end

    // seed load
    seed = 8'hA7; load = 1; set_ctrl(1, 1, 0, 0);
    @(posedge clk); #1 load = 0; set_ctrl(0, 0, 0, 0); #1;
    expect_eq("seed load", state, 8'hA7);
    // both halves in one clock: a plain LFSR step
    t1 = 8'hA7;
    for (int s = 0; s < 20; s++) begin
      set_ctrl(1, 1, 0, 0);
      @(posedge clk); #1;
      t1 = ref_next(t1);
      set_ctrl(0, 0, 0, 0); #1;
      expect_eq("joint step", state, t1);
    end
    // no enable: state holds
    repeat (3) @(posedge clk);
    #1 expect_eq("hold", state, t1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
