// tb_cam_match_unit: checks the CAM matching unit against its truth table.
// K = 0 must always give a match; K = 1 gives a match only when A equals F.
// All eight combinations of K, A and F are applied.
module tb_cam_match_unit;
  logic f, a, k, m;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  // expected M, indexed by {K, A, F}
  localparam logic [7:0] M_TABLE = 8'b1001_1111;

  cam_match_unit dut (.f, .a, .k, .m);

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
      {k, a, f} = 3'(v);
      #1;
      checks++;
      if (m !== M_TABLE[v]) begin
        failures++;
        $display("FAIL K=%b A=%b F=%b: M=%b expected %b", k, a, f, m, M_TABLE[v]);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
