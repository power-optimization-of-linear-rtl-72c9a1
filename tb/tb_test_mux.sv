// tb_test_mux -- checks the input multiplexer with random words: normal
// mode passes the functional inputs, test mode the test patterns.
module tb_test_mux;
  localparam int W = 8;
  logic test_sel;
  logic [W-1:0] func_in, test_in, cut_in;
  int checks = 0, failures = 0;

  test_mux dut (.test_sel, .func_in, .test_in, .cut_in);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      test_sel = 1'(i % 2);
      func_in = 8'($urandom);
      test_in = 8'($urandom);
      #1;
      checks++;
      if (cut_in !== (test_sel ? test_in : func_in)) begin
        failures++;
        $display("FAIL sel=%0b func=%02h test=%02h out=%02h",
                 test_sel, func_in, test_in, cut_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
