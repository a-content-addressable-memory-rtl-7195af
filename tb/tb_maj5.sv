// tb_maj5: exhaustive self-checking test of the five-input majority gate.
// The 32 input combinations are applied in binary order with a the slowest
// and e the fastest toggling input. The expected output comes from the
// number of inputs at 1: 0..2 give 0, 3..5 give 1.
module tb_maj5;
  logic a, b, c, d, e, y;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int ones_seen [6];

  // expected output indexed by the number of inputs at 1
  localparam logic [5:0] MAJ_BY_COUNT = 6'b111000;

  maj5 dut (.a, .b, .c, .d, .e, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ones_seen[n]) ones_seen[n] = 0;
    for (int v = 0; v < 32; v++) begin
      int n;
      {a, b, c, d, e} = 5'(v);
      n = $countones(5'(v));
      ones_seen[n]++;
      #1;
      checks++;
      if (y !== MAJ_BY_COUNT[n]) begin
        failures++;
        $display("FAIL maj5(%b%b%b%b%b) = %b, expected %b", a, b, c, d, e, y, MAJ_BY_COUNT[n]);
      end
      @(posedge clk);
    end
    // every row of the truth table (0..5 inputs at 1) was exercised
    foreach (ones_seen[n]) begin
      checks++;
      if (ones_seen[n] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
