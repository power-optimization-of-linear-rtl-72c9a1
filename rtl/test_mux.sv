// test_mux -- multiplexer between the functional inputs and the test
// patterns at the inputs of the circuit under test.
//
// test_sel = 0 (normal mode) passes the chip's functional inputs; test_sel
// = 1 (test mode) passes the generator's patterns, so the test needs no
// extra input pins. The document describes multiplexing the test inputs
// with the chip inputs under control of the BIST controller; the one-word
// width is this design's choice. Purely combinational.
module test_mux #(
  parameter int unsigned W = lp_bist_pkg::WIDTH
) (
  input  logic         test_sel,
  input  logic [W-1:0] func_in,
  input  logic [W-1:0] test_in,
  output logic [W-1:0] cut_in
);

  always_comb cut_in = test_sel ? test_in : func_in;

endmodule
