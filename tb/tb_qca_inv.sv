// tb_qca_inv: self-checking test of the inverter for both input values.
module tb_qca_inv;
  logic a, y;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  qca_inv dut (.a, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      a = r[0];
      #1;
      checks++;
      if (y !== (r[0] ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL inv(%b) = %b", a, y);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
