// tb_predicate_gates: end-to-end testbench for predicate_gates, the gate set.
//
// Drives all three gates of the set at once from independent random
// streams for a fixed number of clock steps, and checks every output each
// step against reference truth tables written out here as constants.
// Before the random run it applies the three hardware test points of the
// gate set: OR with ai1 = ai2 = 0, Ti1 = 0, Ti2 = 1 gives (Tj, aj) = (1, 0);
// AND with all inputs 1 gives (1, 1); UNOT with Ti = ai = 1, S = 10 gives
// (0, 0). It counts how often each mechanism occurred: each of the four
// select codes of the universal NOT, each of the sixteen OR rows and each
// of the sixteen AND rows. A mechanism that never occurred counts as a
// failure. The top has no parameters, so this run is at full size. A
// watchdog ends the run with a failure if it does not finish in time.
module tb_predicate_gates;
  import pred_pkg::*;

  localparam int STEPS = 2000;

  // UNOT outputs indexed by input {Ti, ai}.
  localparam logic [1:0] ANOT_OUT [4] = '{2'b01, 2'b00, 2'b11, 2'b10};
  localparam logic [1:0] TNOT_OUT [4] = '{2'b10, 2'b11, 2'b00, 2'b01};
  localparam logic [1:0] BNOT_OUT [4] = '{2'b11, 2'b10, 2'b01, 2'b00};
  // OR and AND outputs (Tj, aj) indexed by {Ti1, ai1, Ti2, ai2}.
  localparam logic [1:0] OR_OUT [16] = '{
    2'b00, 2'b01, 2'b10, 2'b11,   // in1 = 00, in2 = 00, 01, 10, 11
    2'b01, 2'b01, 2'b11, 2'b11,   // in1 = 01
    2'b10, 2'b11, 2'b10, 2'b11,   // in1 = 10
    2'b11, 2'b11, 2'b11, 2'b11    // in1 = 11
  };
  localparam logic [1:0] AND_OUT [16] = '{
    2'b00, 2'b00, 2'b00, 2'b00,
    2'b00, 2'b01, 2'b00, 2'b01,
    2'b00, 2'b00, 2'b10, 2'b10,
    2'b00, 2'b01, 2'b10, 2'b11
  };

  logic      clk = 1'b0;
  pred_t     not_x, not_y;
  unot_sel_e not_s;
  pred_t     or_x1, or_x2, or_y;
  pred_t     and_x1, and_x2, and_y;
  int        checks = 0;
  int        failures = 0;
  int        sel_seen [4];
  int        or_seen  [16];
  int        and_seen [16];

  always #5 clk = ~clk;

  predicate_gates dut (
    .not_x (not_x),  .not_s (not_s),   .not_y (not_y),
    .or_x1 (or_x1),  .or_x2 (or_x2),   .or_y  (or_y),
    .and_x1(and_x1), .and_x2(and_x2),  .and_y (and_y)
  );

  function automatic logic [1:0] not_ref(input logic [1:0] sel, input logic [1:0] in);
    case (sel)
      2'b00:   return ANOT_OUT[in];
      2'b01:   return TNOT_OUT[in];
      default: return BNOT_OUT[in];
    endcase
  endfunction

  task automatic check(input string what, input logic [1:0] got, input logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: out=%b expected=%b at %0t", what, got, exp, $time);
    end
  endtask

  // Checks all three gates after the inputs have settled.
  task automatic step(input logic [1:0] nx, input logic [1:0] ns,
                      input logic [1:0] o1, input logic [1:0] o2,
                      input logic [1:0] a1, input logic [1:0] a2);
    @(negedge clk);
    not_x  = nx;  not_s  = unot_sel_e'(ns);
    or_x1  = o1;  or_x2  = o2;
    and_x1 = a1;  and_x2 = a2;
    @(posedge clk);
    check("UNOT", not_y, not_ref(ns, nx));
    check("OR",   or_y,  OR_OUT[{o1, o2}]);
    check("AND",  and_y, AND_OUT[{a1, a2}]);
    sel_seen[ns]++;
    or_seen[{o1, o2}]++;
    and_seen[{a1, a2}]++;
  endtask

  initial begin
    repeat (STEPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sel_seen[i]) sel_seen[i] = 0;
    foreach (or_seen[i])  or_seen[i]  = 0;
    foreach (and_seen[i]) and_seen[i] = 0;
    not_x = '0; not_s = UNOT_ANOT;
    or_x1 = '0; or_x2 = '0; and_x1 = '0; and_x2 = '0;

    // Hardware test points, written as {T, a}.
    step(2'b11, 2'b10, 2'b00, 2'b10, 2'b11, 2'b11);
    checks++;
    if (or_y !== 2'b10 || and_y !== 2'b11 || not_y !== 2'b00) begin
      failures++;
      $display("FAIL hardware points: or=%b and=%b unot=%b", or_y, and_y, not_y);
    end

    for (int n = 0; n < STEPS; n++)
      step(2'($urandom), 2'($urandom), 2'($urandom), 2'($urandom),
           2'($urandom), 2'($urandom));

    foreach (sel_seen[i]) begin
      checks++;
      if (sel_seen[i] == 0) begin
        failures++;
        $display("FAIL UNOT select %b never applied", 2'(i));
      end
    end
    foreach (or_seen[i]) begin
      checks++;
      if (or_seen[i] == 0) begin
        failures++;
        $display("FAIL OR row %b never applied", 4'(i));
      end
    end
    foreach (and_seen[i]) begin
      checks++;
      if (and_seen[i] == 0) begin
        failures++;
        $display("FAIL AND row %b never applied", 4'(i));
      end
    end
    $display("UNOT selects applied: ANOT=%0d TNOT=%0d BNOT=%0d spare=%0d",
             sel_seen[0], sel_seen[1], sel_seen[2], sel_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
