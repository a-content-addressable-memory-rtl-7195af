// tb_cam_priority_encoder: exhaustive self-checking test of the match
// address encoder for eight words. For every match vector the expected
// address is found by scanning from word 0 upwards, valid by testing for any
// set bit, and multi by counting the set bits.
module tb_cam_priority_encoder;
  localparam int unsigned WORDS = 8;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [WORDS-1:0] match;
  logic [AW-1:0]    addr;
  logic             valid, multi;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  cam_priority_encoder dut (.match, .addr, .valid, .multi);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << WORDS); v++) begin
      int first;
      match = WORDS'(v);
      first = -1;
      for (int w = 0; w < WORDS; w++)
        if (first < 0 && match[w]) first = w;
      #1;
      checks++;
      if (valid !== (first >= 0) || multi !== ($countones(match) > 1) ||
          (first >= 0 && addr !== AW'(first)) || (first < 0 && addr !== '0)) begin
        failures++;
        $display("FAIL match=%b: addr=%0d valid=%b multi=%b", match, addr, valid, multi);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
