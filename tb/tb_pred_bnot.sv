// tb_pred_bnot: self-checking testbench for pred_bnot, the BNOT predicate gate.
//
// Applies the four input combinations of (Ti, ai) one per clock step and
// compares (Tj, aj) with the gate's truth table, written out here as
// constants independently of the RTL. A watchdog ends the run with a
// failure if the sequence does not finish in time.
module tb_pred_bnot;
  import pred_pkg::*;

  // Truth table rows {Ti, ai, Tj, aj}.
  localparam logic [3:0] TABLE [4] = '{4'b0011, 4'b0110, 4'b1001, 4'b1100};

  logic  clk = 1'b0;
  pred_t x;
  pred_t y;
  int    checks = 0;
  int    failures = 0;

  always #5 clk = ~clk;

  pred_bnot dut (.x(x), .y(y));

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    foreach (TABLE[i]) begin
      @(negedge clk);
      x = TABLE[i][3:2];
      @(posedge clk);
      checks++;
      if (y !== TABLE[i][1:0]) begin
        failures++;
        $display("FAIL row %0d: in=%b out=%b expected=%b", i + 1, x, y, TABLE[i][1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
