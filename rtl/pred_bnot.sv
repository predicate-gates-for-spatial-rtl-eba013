// pred_bnot: Boolean NOT (BNOT) predicate gate.
//
// Inverts both wires of a predicate expression:
// (Ti, ai) -> (not Ti, not ai). Two inverters, purely combinational, no
// clock and no reset.
//
// Interface: x is the input expression (Ti, ai), y the output (Tj, aj).
// The truth table is the defined BNOT gate; the pred_t packing is this
// design's choice.
module pred_bnot
  import pred_pkg::*;
(
  input  pred_t x,
  output pred_t y
);

  always_comb begin
    y.t = ~x.t;
    y.a = ~x.a;
  end

endmodule
