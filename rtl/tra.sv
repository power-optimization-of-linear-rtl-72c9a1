// tra -- test response analyzer.
//
// When check is high for a clock it compares the MISR signature with the
// expected (fault-free) signature and registers the verdict: done goes high
// and stays high, with go = 1 for a match and nogo = 1 for a mismatch.
// clear drops done, go and nogo. The document gives the analyzer's job
// (compare the response with the expected one, Go/No go); taking the
// expected signature as an input and the register-and-hold timing are this
// design's choices. Reset is active-low and asynchronous.
module tra #(
  parameter int unsigned W = lp_bist_pkg::WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         check,
  input  logic [W-1:0] sig,
  input  logic [W-1:0] golden,
  output logic         done,
  output logic         go,
  output logic         nogo
);

  logic done_q, match_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q  <= 1'b0;
      match_q <= 1'b0;
    end else if (clear) begin
      done_q  <= 1'b0;
      match_q <= 1'b0;
    end else if (check) begin
      done_q  <= 1'b1;
      match_q <= (sig == golden);
    end
  end

  assign done = done_q;
  assign go   = done_q && match_q;
  assign nogo = done_q && !match_q;

endmodule
