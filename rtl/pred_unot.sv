// pred_unot: universal NOT (UNOT) predicate gate.
//
// One gate that performs any of the three predicate inversions. The input
// expression feeds an ANOT, a TNOT and a BNOT gate in parallel, and a
// 4-to-1 multiplexer driven by the 2-bit control S routes one of their
// results to the common output. Purely combinational: the output follows
// x and s after the inverter and multiplexer delays; there is no clock and
// no reset.
//
// Interface: x is the input (Ti, ai), s the select S (unot_sel_e), y the
// output (Tj, aj).
//   S = 00  ANOT  (Ti, not ai)
//   S = 01  TNOT  (not Ti, ai)
//   S = 10  BNOT  (not Ti, not ai)
//   S = 11  BNOT  (spare code)
// The structure (three gates and a multiplexer) and S = 10 selecting BNOT
// follow the defined gate. The codes for ANOT and TNOT, and BNOT on the
// spare code 11, are this design's choice.
module pred_unot
  import pred_pkg::*;
(
  input  pred_t     x,
  input  unot_sel_e s,
  output pred_t     y
);

  pred_t y_anot, y_tnot, y_bnot;

  pred_anot u_anot (.x(x), .y(y_anot));
  pred_tnot u_tnot (.x(x), .y(y_tnot));
  pred_bnot u_bnot (.x(x), .y(y_bnot));

  always_comb begin
    unique case (s)
      UNOT_ANOT:  y = y_anot;
      UNOT_TNOT:  y = y_tnot;
      UNOT_BNOT,
      UNOT_BNOT2: y = y_bnot;
    endcase
  end

endmodule
