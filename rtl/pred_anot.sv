// pred_anot: amplitude NOT (ANOT) predicate gate.
//
// Inverts only the amplitude bit of a predicate expression and passes the
// topological-chart bit through: (Ti, ai) -> (Ti, not ai). It is one
// inverter and one follower wire, purely combinational, with no clock and
// no reset; the output settles one gate delay after the input.
//
// Interface: x is the input expression (Ti, ai), y the output (Tj, aj).
// The function is the one defined for the ANOT gate; carrying the pair as
// the pred_t struct is this design's choice.
module pred_anot
  import pred_pkg::*;
(
  input  pred_t x,
  output pred_t y
);

  always_comb begin
    y.t = x.t;
    y.a = ~x.a;
  end

endmodule
