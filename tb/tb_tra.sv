// tb_tra -- checks the response analyzer: no verdict before check, go on a
// matching signature, nogo on a mismatch, the verdict held after check falls
// and while the signature changes, and clear dropping the verdict.
module tb_tra;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clear = 0, check = 0;
  logic [W-1:0] sig = '0, golden = '0;
  logic done, go, nogo;
  int checks = 0, failures = 0;

  tra dut (.clk, .rst_n, .clear, .check, .sig, .golden, .done, .go, .nogo);

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
      $display("FAIL %s (done=%0b go=%0b nogo=%0b)", what, done, go, nogo);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(!done && !go && !nogo, "idle after reset");
    for (int i = 0; i < 100; i++) begin
      bit match;
      sig = 8'($urandom);
      match = (i % 2 == 0);
      golden = match ? sig : sig ^ (8'h1 << (i % 8));
      clear = 1; @(posedge clk); #1 clear = 0;
      chk(!done && !go && !nogo, "cleared");
      @(posedge clk); #1;
      chk(!done, "no verdict without check");
      check = 1; @(posedge clk); #1 check = 0;
      chk(done, "done after check");
      chk(go == match && nogo == !match, "verdict");
      sig = ~sig;
      @(posedge clk); #1;
      chk(done && go == match && nogo == !match, "verdict held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
