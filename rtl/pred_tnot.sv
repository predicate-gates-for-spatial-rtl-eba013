// pred_tnot: topological-chart NOT (TNOT) predicate gate.
//
// Inverts only the topological-chart bit of a predicate expression and
// passes the amplitude bit through a follower: (Ti, ai) -> (not Ti, ai).
// Purely combinational, no clock and no reset.
//
// Interface: x is the input expression (Ti, ai), y the output (Tj, aj).
// The structure (a follower and an inverter) and the truth table are the
// defined TNOT gate; the pred_t packing is this design's choice.
module pred_tnot
  import pred_pkg::*;
(
  input  pred_t x,
  output pred_t y
);

  always_comb begin
    y.t = ~x.t;
    y.a = x.a;
  end

endmodule
