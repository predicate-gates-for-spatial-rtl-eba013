// tb_pred_or: self-checking testbench for pred_or, the predicate OR gate.
//
// Applies all sixteen combinations of (Ti1, ai1, Ti2, ai2), one per clock
// step, and compares (Tj, aj) with the gate's sixteen-row truth table,
// written out here as constants independently of the RTL. A second pass
// applies the same rows in a random order so that the output is also seen
// to follow changes between arbitrary rows. A watchdog ends the run with a
// failure if the sequence does not finish in time.
module tb_pred_or;
  import pred_pkg::*;

  // Truth table rows {Ti1, ai1, Ti2, ai2, Tj, aj}, in table order.
  localparam logic [5:0] TABLE [16] = '{
    6'b000000, 6'b010001, 6'b100010, 6'b110011, 6'b001010, 6'b011011, 6'b101010, 6'b111011, 6'b000101, 6'b010101, 6'b100111, 6'b110111, 6'b001111, 6'b011111, 6'b101111, 6'b111111
  };

  logic  clk = 1'b0;
  pred_t x1, x2;
  pred_t y;
  int    checks = 0;
  int    failures = 0;

  always #5 clk = ~clk;

  pred_or dut (.x1(x1), .x2(x2), .y(y));

  task automatic apply_row(input int i);
    @(negedge clk);
    x1 = TABLE[i][5:4];
    x2 = TABLE[i][3:2];
    @(posedge clk);
    checks++;
    if (y !== TABLE[i][1:0]) begin
      failures++;
      $display("FAIL row %0d: in1=%b in2=%b out=%b expected=%b",
               i + 1, x1, x2, y, TABLE[i][1:0]);
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
    x1 = '0;
    x2 = '0;
    for (int i = 0; i < 16; i++) apply_row(i);
    for (int n = 0; n < 64; n++) apply_row(int'($urandom_range(15)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
