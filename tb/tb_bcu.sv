// tb_bcu -- checks the BIST controller with a short run (NUM_PATTERNS = 5).
// The testbench plays the phase sequencer: while lfsr_run is high it raises
// step on every fourth clock. It checks the state order, one init pulse,
// 4*NUM_PATTERNS run and MISR-enable clocks, one check pulse, done on the
// (4*NUM_PATTERNS+3)-th clock edge after test_mode rises, test_sel in every
// state, holding in DONE, the return to NORMAL, and an abort mid-run.
module tb_bcu;
  import lp_bist_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, test_mode = 0, step;
  bcu_state_e state;
  logic test_sel, init, lfsr_run, misr_en, tra_check, done;
  int checks = 0, failures = 0;
  int run_cnt = 0;

  bcu #(.NUM_PATTERNS(N)) dut (.clk, .rst_n, .test_mode, .step, .state,
    .test_sel, .init, .lfsr_run, .misr_en, .tra_check, .done);

  always #5 clk = ~clk;

  // stand-in for the phase sequencer
  always_ff @(posedge clk)
    if (init) run_cnt <= 0;
    else if (lfsr_run) run_cnt <= run_cnt + 1;
  assign step = lfsr_run && (run_cnt % 4 == 3);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state=%s)", what, state.name());
    end
  endtask

  initial begin
    int edges, n_init, n_run, n_misr, n_check;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) begin
      @(posedge clk); #1;
      chk(state == BCU_NORMAL && !test_sel && !lfsr_run && !done, "normal mode idle");
    end
    for (int pass = 0; pass < 2; pass++) begin
      test_mode = 1;
      edges = 0; n_init = 0; n_run = 0; n_misr = 0; n_check = 0;
      while (!done && edges < 100) begin
        if (init) n_init++;
        if (lfsr_run) n_run++;
        if (misr_en) n_misr++;
        if (tra_check) n_check++;
        if (edges > 0) chk(test_sel, "test_sel in test mode");
        @(posedge clk); #1;
        edges++;
      end
      chk(edges == 4 * N + 3, $sformatf("done after %0d edges", edges));
      chk(n_init == 1, "one init pulse");
      chk(n_run == 4 * N, $sformatf("%0d run clocks", n_run));
      chk(n_misr == 4 * N, "misr enable clocks");
      chk(n_check == 1, "one check pulse");
      repeat (4) begin
        @(posedge clk); #1;
        chk(done && state == BCU_DONE && test_sel, "hold in DONE");
      end
      test_mode = 0;
      @(posedge clk); #1;
      chk(state == BCU_NORMAL && !test_sel && !done, "back to NORMAL");
      @(posedge clk); #1;
    end
    // abort in the middle of a run
    test_mode = 1;
    repeat (7) @(posedge clk);
    #1 chk(state == BCU_RUN && lfsr_run, "running before abort");
    test_mode = 0;
    #1 chk(!lfsr_run && !misr_en, "run stops at once when test_mode falls");
    @(posedge clk); #1;
    chk(state == BCU_NORMAL && !test_sel, "abort to NORMAL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
