// tb_lp_bist_top -- end-to-end test of the low-power BIST wrapper at its
// default size (8 stages, 255 LFSR steps, 1020 test vectors per run) around
// a small combinational CUT model.
//
// An independent reference computes the vector sequence T1, Ta, Tb, Tc of
// every LFSR step (Fibonacci LFSR, taps at stages 8, 6, 5, 4, seed 01,
// injector AND/OR rule), the CUT's response to each and the MISR signature.
// Every clock of a run the CUT inputs are compared with the reference
// vector. Runs:
//   1. injector R = 1, correct expected signature   -> go
//   2. injector R = 0, correct expected signature   -> go
//   3. R = 1, wrong expected signature              -> nogo
//   4. R = 1, stuck-at-0 fault in the CUT           -> nogo
//   5. abort: test_mode dropped in mid-run          -> back to normal mode
// Between runs the normal-mode path (CUT inputs = functional inputs) is
// checked. Each run's length (done on edge 4*255+3) and the low-power
// property (transitions over the five vectors of a step equal those
// between T1 and T2) are checked. Every mechanism is counted; one that
// never happens counts as a failure.
module tb_lp_bist_top;
  import lp_bist_pkg::*;
  localparam int N  = 255;
  localparam int NV = 4 * N;

  logic clk = 0, rst_n = 0, test_mode = 0, inj_r = 1, fault_en = 0;
  logic [7:0] func_in = '0, golden_sig = '0, cut_pi, cut_po, tp, signature;
  logic [7:0] lfsr_state;
  phase_e phase;
  bcu_state_e bist_state;
  logic done, go, nogo;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_ta = 0, n_tb = 0, n_tc = 0, n_and = 0, n_or = 0, n_go = 0,
      n_nogo_sig = 0, n_fault_caught = 0, n_normal = 0, n_abort = 0,
      n_lowpower = 0;

  lp_bist_top dut (.clk, .rst_n, .test_mode, .inj_r, .func_in, .golden_sig,
    .cut_pi, .cut_po, .tp, .signature, .lfsr_state, .phase, .bist_state,
    .done, .go, .nogo);

  cut_model u_cut (.a(cut_pi), .fault_en, .y(cut_po));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic logic [7:0] ref_next(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic logic [7:0] ref_cut(logic [7:0] a, logic f);
    logic [7:0] y;
    y[3:0] = a[3:0] + a[7:4];
    y[4]   = ~(a[4] ^ a[3]);
    y[5]   = a[5] | a[2];
    y[6]   = a[6] & a[1];
    y[7]   = a[7] ^ a[0];
    if (f) y[0] = 1'b0;
    return y;
  endfunction

  logic [7:0] vec [NV];

  // reference vector sequence; returns the expected signature
  function automatic logic [7:0] build_ref(logic r, logic f);
    logic [7:0] t1, t2, iv, sig;
    t1 = 8'h01;
    sig = '0;
    for (int s = 0; s < N; s++) begin
      t2 = ref_next(t1);
      iv = r ? (t1 | t2) : (t1 & t2);
      vec[4*s+0] = t1;
      vec[4*s+1] = {t1[7:4], iv[3:0]};
      vec[4*s+2] = {t1[7:4], t2[3:0]};
      vec[4*s+3] = {iv[7:4], t2[3:0]};
      t1 = t2;
    end
    for (int k = 0; k < NV; k++)
      sig = {sig[6:0], sig[7] ^ sig[5] ^ sig[4] ^ sig[3]} ^ ref_cut(vec[k], f);
    return sig;
  endfunction

  task automatic normal_mode_check(int n);
    for (int i = 0; i < n; i++) begin
      func_in = 8'($urandom);
      @(posedge clk); #1;
      chk(bist_state == BCU_NORMAL && cut_pi == func_in, "normal mode passes functional inputs");
      n_normal++;
    end
  endtask

  // one complete self-test; returns go
  task automatic run_test(logic r, logic f, logic [7:0] golden, output logic verdict);
    int k, edges, lp_fail;
    logic [7:0] exp_sig;
    exp_sig = build_ref(r, f);
    inj_r = r; fault_en = f; golden_sig = golden;
    test_mode = 1;
    k = 0; edges = 0; lp_fail = 0;
    while (!done && edges < NV + 20) begin
      @(posedge clk); #1;
      edges++;
      if (bist_state == BCU_RUN) begin
        if (k < NV) begin
          chk(cut_pi == vec[k] && tp == vec[k],
              $sformatf("vector %0d: cut_pi %02h expected %02h", k, cut_pi, vec[k]));
          if (k % 4 == 1 && vec[k] != vec[k-1]) n_ta++;
          if (k % 4 == 2) n_tb++;
          if (k % 4 == 3) n_tc++;
          // low-power property over the step ending here
          if (k % 4 == 0 && k > 0) begin
            int tp_sum = 0;
            for (int j = k - 4; j < k; j++) tp_sum += $countones(vec[j] ^ vec[j+1]);
            if (tp_sum != $countones(vec[k-4] ^ vec[k])) lp_fail++;
            else n_lowpower++;
          end
        end
        k++;
      end
    end
    chk(k == NV, $sformatf("%0d vectors applied, expected %0d", k, NV));
    chk(edges == NV + 3, $sformatf("done after %0d clocks, expected %0d", edges, NV + 3));
    chk(lp_fail == 0, "transitions via intermediate vectors equal T1->T2");
    chk(signature == exp_sig,
        $sformatf("signature %02h expected %02h", signature, exp_sig));
    chk(go == (golden == exp_sig) && nogo == (golden != exp_sig), "go/nogo verdict");
    verdict = go;
    if (r) n_or++; else n_and++;
    repeat (3) @(posedge clk);
    #1 chk(done && go == verdict, "verdict held while test_mode is high");
    test_mode = 0;
    @(posedge clk); #1;
    chk(bist_state == BCU_NORMAL && !done, "back to normal mode");
    fault_en = 0;
  endtask

  initial begin
    logic v;
    logic [7:0] good_sig;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    normal_mode_check(10);

    // 1. OR injector, good CUT
    good_sig = build_ref(1'b1, 1'b0);
    run_test(1'b1, 1'b0, good_sig, v);
    chk(v, "run 1 passes");
    if (v) n_go++;
    normal_mode_check(10);

    // 2. AND injector, good CUT
    good_sig = build_ref(1'b0, 1'b0);
    run_test(1'b0, 1'b0, good_sig, v);
    chk(v, "run 2 passes");
    if (v) n_go++;
    normal_mode_check(10);

    // 3. wrong expected signature
    good_sig = build_ref(1'b1, 1'b0);
    run_test(1'b1, 1'b0, good_sig ^ 8'h80, v);
    chk(!v && nogo, "run 3 reports nogo");
    if (!v) n_nogo_sig++;

    // 4. stuck-at fault in the CUT, expected signature of the good CUT
    run_test(1'b1, 1'b1, good_sig, v);
    chk(!v, "run 4 catches the CUT fault");
    if (!v) n_fault_caught++;
    normal_mode_check(10);

    // 5. abort mid-run
    test_mode = 1;
    repeat (100) @(posedge clk);
    #1 chk(bist_state == BCU_RUN, "running before abort");
    test_mode = 0;
    @(posedge clk); #1;
    chk(bist_state == BCU_NORMAL && !done, "abort returns to normal mode");
    if (bist_state == BCU_NORMAL) n_abort++;
    normal_mode_check(10);

    // a full run after the abort starts again from the seed
    good_sig = build_ref(1'b1, 1'b0);
    run_test(1'b1, 1'b0, good_sig, v);
    chk(v, "run after abort passes");

    $display("mechanisms: Ta=%0d Tb=%0d Tc=%0d AND-runs=%0d OR-runs=%0d go=%0d nogo(sig)=%0d fault-caught=%0d normal=%0d abort=%0d lowpower-steps=%0d",
             n_ta, n_tb, n_tc, n_and, n_or, n_go, n_nogo_sig, n_fault_caught,
             n_normal, n_abort, n_lowpower);
    chk(n_ta > 0, "Ta vectors seen");
    chk(n_tb > 0, "Tb vectors seen");
    chk(n_tc > 0, "Tc vectors seen");
    chk(n_and > 0, "AND injector run");
    chk(n_or > 0, "OR injector run");
    chk(n_go > 0, "go seen");
    chk(n_nogo_sig > 0, "nogo on wrong signature seen");
    chk(n_fault_caught > 0, "CUT fault caught");
    chk(n_normal > 0, "normal mode seen");
    chk(n_abort > 0, "abort seen");
    chk(n_lowpower > 0, "low-power steps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
