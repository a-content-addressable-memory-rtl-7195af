// tb_min5: exhaustive self-checking test of the five-input minority gate.
// The expected output is 1 when at most two inputs are 1. It also checks the
// use in the CAM matching unit: with two inputs tied to 0 the gate is a
// three-input NAND.
module tb_min5;
  logic a, b, c, d, e, y;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  min5 dut (.a, .b, .c, .d, .e, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      checks++;
      if (y !== ($countones(5'(v)) <= 2)) begin
        failures++;
        $display("FAIL min5(%b%b%b%b%b) = %b", a, b, c, d, e, y);
      end
      if (b == 1'b0 && c == 1'b0) begin
        checks++;
        if (y !== !(a && d && e)) begin
          failures++;
          $display("FAIL NAND use a=%b d=%b e=%b y=%b", a, d, e, y);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
