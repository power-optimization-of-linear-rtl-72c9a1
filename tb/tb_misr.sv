// tb_misr -- checks the signature register against a reference model
// (shift with feedback from stages 8, 6, 5, 4, then XOR the input word),
// with random data and random enable, and checks clear and hold.
module tb_misr;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [W-1:0] d = '0, sig, model;
  int checks = 0, failures = 0;

  misr dut (.clk, .rst_n, .clear, .en, .d, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model = '0;
    checks++;
    if (sig !== 8'h00) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 1000; i++) begin
      en = 1'($urandom_range(0, 3) != 0);
      d = 8'($urandom);
      clear = (i == 500);
      @(posedge clk);
      if (clear) model = '0;
      else if (en) model = {model[6:0], model[7] ^ model[5] ^ model[4] ^ model[3]} ^ d;
      #1;
      checks++;
      if (sig !== model) begin
        failures++;
        $display("FAIL cycle %0d: sig %02h model %02h", i, sig, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
