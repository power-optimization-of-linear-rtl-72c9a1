// misr -- multiple input signature register.
//
// Compresses one W-bit CUT response word per enabled clock into a W-bit
// signature: the register shifts like the pattern LFSR (same tap mask,
// feedback into bit 0) and the response word is XORed into the shifted
// value. clear loads zero and has priority over en. The document gives the
// MISR's role (signature analysis of the CUT outputs); the width, the
// polynomial and the zero start value are this design's choices. Reset is
// active-low and asynchronous; sig is the register itself.
module misr
  import lp_bist_pkg::*;
#(
  parameter int unsigned  W         = WIDTH,
  parameter logic [W-1:0] POLY_TAPS = TAPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  logic [W-1:0] sig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig_q <= '0;
    else if (clear) sig_q <= '0;
    else if (en)    sig_q <= {sig_q[W-2:0], ^(sig_q & POLY_TAPS)} ^ d;
  end

  assign sig = sig_q;

endmodule
