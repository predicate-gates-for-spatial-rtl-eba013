// pred_pkg: types shared by the predicate gates.
//
// A predicate expression (T, a) pairs a topological-chart bit T (the
// predicate) with an amplitude bit a (the predicate variable). On chip the
// pair travels on two ordinary single-ended wires, T and a, with T0/a0 as
// logic 0 and T1/a1 as logic 1; that mapping is the one the gates are
// defined on. pred_t packs the pair with T in the upper bit, so a 2-bit
// literal reads as "Ta" (2'b10 is (T1, a0)).
//
// unot_sel_e is the 2-bit operation select S of the universal NOT gate.
// S = 10 choosing the Boolean NOT follows the gate's published test; the
// codes 00 (amplitude NOT) and 01 (chart NOT) follow the order in which
// the three inversions are introduced, and 11, which has no defined
// meaning, is decoded as a second Boolean NOT code. Those three codes are
// this design's own choice.
package pred_pkg;

  typedef struct packed {
    logic t;  // topological chart: 0 = T0, 1 = T1
    logic a;  // amplitude:         0 = a0, 1 = a1
  } pred_t;

  typedef enum logic [1:0] {
    UNOT_ANOT  = 2'b00,
    UNOT_TNOT  = 2'b01,
    UNOT_BNOT  = 2'b10,
    UNOT_BNOT2 = 2'b11
  } unot_sel_e;

endpackage
