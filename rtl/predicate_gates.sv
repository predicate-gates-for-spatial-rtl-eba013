// predicate_gates: the minimal predicate gate set.
//
// Places the three gates that make up a complete set of predicate
// operations side by side: a universal NOT (which contains the ANOT, TNOT
// and BNOT gates and their select multiplexer), a predicate OR and a
// predicate AND. Each gate keeps its own input and output ports; they are
// not wired to each other, so the set can be used as a small library test
// chip or composed outside into larger predicate expressions. Everything
// is combinational: no clock, no reset, outputs follow inputs after the
// gate delays.
//
// Ports, each a (T, a) pair packed as pred_t:
//   not_x, not_s -> not_y   universal NOT, not_s is the select S
//   or_x1, or_x2 -> or_y    predicate OR
//   and_x1, and_x2 -> and_y predicate AND
// The gate set follows the defined design; presenting the gates as one
// top with separate ports is this design's choice.
module predicate_gates
  import pred_pkg::*;
(
  input  pred_t     not_x,
  input  unot_sel_e not_s,
  output pred_t     not_y,
  input  pred_t     or_x1,
  input  pred_t     or_x2,
  output pred_t     or_y,
  input  pred_t     and_x1,
  input  pred_t     and_x2,
  output pred_t     and_y
);

  pred_unot u_unot (.x(not_x), .s(not_s), .y(not_y));
  pred_or   u_or   (.x1(or_x1), .x2(or_x2), .y(or_y));
  pred_and  u_and  (.x1(and_x1), .x2(and_x2), .y(and_y));

endmodule
