// tb_cam_cell: self-checking test of the one-bit CAM cell, including its
// two-cycle latency.
//
// First all 16 combinations of K, R/W, I and A are swept (K toggling slowest,
// A fastest), each held for four cycles, then random operations are issued
// every cycle. The testbench keeps its own model of the stored bit and a
// queue of expected {F, O, M} per operation; the cell's output after each
// clock edge must equal the entry of the operation issued exactly
// CAM_CELL_LATENCY cycles earlier. Counts of writes, reads, masked bits,
// matches and mismatches must all be non-zero.
module tb_cam_cell;
  import qca_cam_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  cam_cell_in_t  in;
  cam_cell_out_t out;
  logic stored;
  cam_cell_out_t expq[$];
  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_masked = 0, n_match = 0, n_mismatch = 0;

  cam_cell dut (.clk, .rst_n, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one operation after a falling edge; after the next rising edge
  // check the output against the operation LATENCY cycles back
  task automatic op(input cam_cell_in_t v);
    cam_cell_out_t e;
    in = v;
    e.f = v.rw ? stored : v.i;
    e.o = v.rw ? stored : 1'b0;
    e.m = (v.k == 1'b0) || (v.a == e.f);
    if (v.rw) n_read++; else n_write++;
    if (!v.k) n_masked++;
    else if (v.a == e.f) n_match++;
    else n_mismatch++;
    expq.push_back(e);
    @(posedge clk);
    stored = e.f;
    @(negedge clk);
    if (expq.size() > CAM_CELL_LATENCY - 1) begin
      cam_cell_out_t x;
      x = expq.pop_front();
      checks++;
      if (out !== x) begin
        failures++;
        $display("FAIL out {F,O,M}=%b expected %b", out, x);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    in = '{rw: 1'b1, i: 1'b0, a: 1'b0, k: 1'b0};
    stored = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // the pipeline comes out of reset holding zeros
    for (int s = 0; s < CAM_CELL_LATENCY - 1; s++) expq.push_back('0);
    // sweep of all 16 input combinations, K slowest, A fastest
    for (int v = 0; v < 16; v++)
      repeat (4) op('{k: v[3], rw: v[2], i: v[1], a: v[0]});
    // random traffic
    for (int n = 0; n < 1000; n++)
      op(4'($urandom_range(0, 15)));
    checks++;
    if (n_write == 0 || n_read == 0 || n_masked == 0 || n_match == 0 || n_mismatch == 0) begin
      failures++;
      $display("FAIL coverage write=%0d read=%0d masked=%0d match=%0d mismatch=%0d",
               n_write, n_read, n_masked, n_match, n_mismatch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
