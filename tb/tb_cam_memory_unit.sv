// tb_cam_memory_unit: self-checking test of the CAM memory unit.
// First the four rows of the read/write truth table are applied in order
// (write 1, read, write 0, read), then a random stream of reads and writes.
// A behavioural bit in the testbench tracks what the cell must hold: a write
// must show F = I and O = 0, a read F = O = stored bit. It also checks that a
// value is held over many consecutive reads.
module tb_cam_memory_unit;
  logic clk = 1'b0;
  logic rst_n;
  logic rw, i, f, o;
  logic stored;
  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0;

  cam_memory_unit dut (.clk, .rst_n, .rw, .i, .f, .o);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one operation for one cycle and check it before the clock edge
  task automatic op(input logic rw_v, input logic i_v);
    logic exp_f, exp_o;
    rw = rw_v;
    i  = i_v;
    exp_f = rw_v ? stored : i_v;
    exp_o = rw_v ? stored : 1'b0;
    #1;
    checks++;
    if (f !== exp_f || o !== exp_o) begin
      failures++;
      $display("FAIL rw=%b i=%b stored=%b: F=%b O=%b expected F=%b O=%b",
               rw_v, i_v, stored, f, o, exp_f, exp_o);
    end
    if (rw_v) n_read++; else n_write++;
    @(posedge clk);
    stored = exp_f;
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; rw = 1'b1; i = 1'b0; stored = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // truth table rows
    op(1'b0, 1'b1);
    op(1'b1, 1'b0);
    op(1'b0, 1'b0);
    op(1'b1, 1'b1);
    // hold a 1 over many reads with a toggling data input
    op(1'b0, 1'b1);
    for (int n = 0; n < 20; n++) op(1'b1, n[0]);
    // random traffic
    for (int n = 0; n < 500; n++) op(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    checks++;
    if (n_write == 0 || n_read == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
