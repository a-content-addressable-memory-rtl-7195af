// cam_cell: one-bit content-addressable memory cell built from majority gates.
//
// The memory unit stores a bit F and performs the read or write selected by
// R/W; the matching unit then compares the resulting F with the argument bit
// A, masked by the key bit K:
//   R/W = 0: F = I, O = 0           (write)
//   R/W = 1: F = O = stored bit     (read)
//   M = 1 when K = 0 or A == F, else 0
// The cell uses six three-input majority gates and one five-input minority
// gate, as in its QCA layout. The layout needs LATENCY clock cycles from its
// inputs to its outputs; the model reproduces that with a LATENCY-deep
// register pipeline on {F, O, M}. The stored bit itself is updated on the
// first rising edge after the inputs are applied, so an operation issued in
// the next cycle already sees it.
//
// Timing: inputs sampled at a rising edge of clk appear on out after LATENCY
// rising edges. One operation can be issued every cycle. Active-low
// asynchronous reset clears the stored bit and the pipeline (the reset is this
// design's own addition).
module cam_cell
  import qca_cam_pkg::*;
#(
  parameter int unsigned LATENCY = CAM_CELL_LATENCY  // >= 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cam_cell_in_t  in,
  output cam_cell_out_t out
);

  cam_cell_out_t now;
  cam_cell_out_t pipe [LATENCY];

  cam_memory_unit u_mem (
    .clk, .rst_n, .rw(in.rw), .i(in.i), .f(now.f), .o(now.o)
  );

  cam_match_unit u_match (.f(now.f), .a(in.a), .k(in.k), .m(now.m));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int s = 0; s < LATENCY; s++) pipe[s] <= '0;
    end else begin
      pipe[0] <= now;
      for (int s = 1; s < LATENCY; s++) pipe[s] <= pipe[s-1];
    end

  assign out = pipe[LATENCY-1];

  initial assert (LATENCY >= 1) else $error("cam_cell: LATENCY must be at least 1");

endmodule
