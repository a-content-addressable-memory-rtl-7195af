// tb_maj3: exhaustive self-checking test of the three-input majority gate.
// Every input combination is applied; the expected output is 1 when two or
// more inputs are 1 (counted, not taken from the gate equation). It also
// checks the AND/OR use of the gate with one input tied to 0 or 1.
module tb_maj3;
  logic a, b, c, y;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  maj3 dut (.a, .b, .c, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL maj3(%b,%b,%b) = %b", a, b, c, y);
      end
      // c = 0 gives AND of a and b, c = 1 gives OR
      checks++;
      if (c == 1'b0 && y !== (a && b)) begin failures++; $display("FAIL AND use"); end
      if (c == 1'b1 && y !== (a || b)) begin failures++; $display("FAIL OR use");  end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
