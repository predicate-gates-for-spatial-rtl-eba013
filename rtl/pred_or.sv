// pred_or: predicate OR gate.
//
// ORs two predicate expressions wire by wire with a pair of ordinary
// 2-input OR gates: Tj = Ti1 or Ti2 and aj = ai1 or ai2. The chart of the
// result is T1 if either input has chart T1, and its amplitude is a1 if
// either input has amplitude a1. Purely combinational, no clock and no
// reset.
//
// Interface: x1 = (Ti1, ai1), x2 = (Ti2, ai2), y = (Tj, aj). Structure and
// truth table are the defined gate; the pred_t packing is this design's
// choice.
module pred_or
  import pred_pkg::*;
(
  input  pred_t x1,
  input  pred_t x2,
  output pred_t y
);

  always_comb begin
    y.t = x1.t | x2.t;
    y.a = x1.a | x2.a;
  end

endmodule
