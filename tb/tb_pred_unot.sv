// tb_pred_unot: self-checking testbench for pred_unot, the universal NOT.
//
// Sweeps the select S from 00 to 11 and, for each value, the four inputs
// (Ti, ai) 00, 01, 10, 11, one per clock step, as in the gate's published
// test. The expected output comes from the ANOT, TNOT and BNOT truth
// tables written out here as constants (S = 00 ANOT, 01 TNOT, 10 and 11
// BNOT). The single hardware point Ti = ai = 1, S = 10 -> (0, 0) is checked
// again on its own. A watchdog ends the run with a failure if the
// sequence does not finish in time.
module tb_pred_unot;
  import pred_pkg::*;

  // Outputs (Tj, aj) indexed by input {Ti, ai}.
  localparam logic [1:0] ANOT_OUT [4] = '{2'b01, 2'b00, 2'b11, 2'b10};
  localparam logic [1:0] TNOT_OUT [4] = '{2'b10, 2'b11, 2'b00, 2'b01};
  localparam logic [1:0] BNOT_OUT [4] = '{2'b11, 2'b10, 2'b01, 2'b00};

  logic      clk = 1'b0;
  pred_t     x;
  unot_sel_e s;
  pred_t     y;
  int        checks = 0;
  int        failures = 0;

  always #5 clk = ~clk;

  pred_unot dut (.x(x), .s(s), .y(y));

  function automatic logic [1:0] expected(input logic [1:0] sel, input logic [1:0] in);
    case (sel)
      2'b00:   return ANOT_OUT[in];
      2'b01:   return TNOT_OUT[in];
      default: return BNOT_OUT[in];
    endcase
  endfunction

  task automatic apply(input logic [1:0] sel, input logic [1:0] in);
    @(negedge clk);
    s = unot_sel_e'(sel);
    x = in;
    @(posedge clk);
    checks++;
    if (y !== expected(sel, in)) begin
      failures++;
      $display("FAIL S=%b in=%b out=%b expected=%b", sel, in, y, expected(sel, in));
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    s = UNOT_ANOT;
    for (int sel = 0; sel < 4; sel++)
      for (int in = 0; in < 4; in++)
        apply(2'(sel), 2'(in));
    // Random order, to see the multiplexer follow arbitrary select changes.
    for (int n = 0; n < 64; n++) apply(2'($urandom_range(3)), 2'($urandom_range(3)));
    // Hardware point: Ti = 1, ai = 1, S = 10 gives Tj = aj = 0.
    @(negedge clk);
    s = UNOT_BNOT;
    x = '{t: 1'b1, a: 1'b1};
    @(posedge clk);
    checks++;
    if (y !== '{t: 1'b0, a: 1'b0}) begin
      failures++;
      $display("FAIL BNOT point: out=%b", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
