// pred_and: predicate AND gate.
//
// ANDs two predicate expressions wire by wire with a pair of ordinary
// 2-input AND gates: Tj = Ti1 and Ti2, aj = ai1 and ai2. The result has
// chart T1 only if both inputs have chart T1, and amplitude a1 only if
// both have amplitude a1. Purely combinational, no clock and no reset.
//
// Interface: x1 = (Ti1, ai1), x2 = (Ti2, ai2), y = (Tj, aj). Structure and
// truth table are the defined gate; the pred_t packing is this design's
// choice.
module pred_and
  import pred_pkg::*;
(
  input  pred_t x1,
  input  pred_t x2,
  output pred_t y
);

  always_comb begin
    y.t = x1.t & x2.t;
    y.a = x1.a & x2.a;
  end

endmodule
