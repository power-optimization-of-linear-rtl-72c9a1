// rinj -- injector cell of the low-power LFSR.
//
// For one LFSR stage it forms the AND and the OR of the stage's present
// state (q) and next state (d), and a 2:1 multiplexer picks one of them:
// r = 0 gives the AND, r = 1 the OR. When q and d agree both gates give that
// value; when they differ the output is r. The output therefore always
// equals q or d, so an intermediate vector built from injector outputs lies
// between the present and the next LFSR state and adds no extra transition.
// Gate choice and mux order (0 = AND, 1 = OR, select R) follow the injector
// drawing. Purely combinational.
module rinj (
  input  logic q,   // present state of the stage
  input  logic d,   // next state of the stage
  input  logic r,   // injector select: 0 = AND, 1 = OR
  output logic y
);

  logic and_y, or_y;

  always_comb begin
    and_y = q & d;
    or_y  = q | d;
    y     = r ? or_y : and_y;
  end

endmodule
