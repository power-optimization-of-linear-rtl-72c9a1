// tb_rinj -- exhaustive check of the injector cell: all eight combinations
// of present state, next state and select R against the AND / OR rule, and
// the property that the output always equals the present or the next state.
module tb_rinj;
  logic q, d, r, y;
  int checks = 0, failures = 0;

  rinj dut (.q, .d, .r, .y);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp_y;
      {r, q, d} = 3'(i);
      #1;
      exp_y = r ? (q | d) : (q & d);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL r=%0b q=%0b d=%0b y=%0b exp=%0b", r, q, d, y, exp_y);
      end
      checks++;
      if (y != q && y != d) begin
        failures++;
        $display("FAIL output is neither present nor next state");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
