// cam_memory_unit: the memory half of the QCA CAM cell.
//
// Stores one bit F. Four three-input majority gates and one inverter form it:
//   AND1 = maj(F_stored, 0, R/W)   keeps the old bit when R/W = 1
//   AND2 = maj(~R/W,     0, I)     passes the input bit when R/W = 0
//   F    = maj(AND1, 1, AND2)      the OR of the two: a 2:1 multiplexer
//   O    = maj(R/W,      0, F)     read output, 0 during a write
// So R/W = 0 writes I (F = I, O = 0) and R/W = 1 reads (F = O = stored bit).
// In QCA the bit lives in a wire loop from F back to AND1 that spans one clock
// period; here that loop is the register f_q, loaded with F on every rising
// edge of clk. f_q is cleared by the active-low reset, which is this design's
// own choice. f and o are combinational from the inputs and f_q; f_q is the
// value the next operation sees.
module cam_memory_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic rw,     // 0: write, 1: read
  input  logic i,      // data input
  output logic f,      // cell content after this operation (combinational)
  output logic o       // read output (combinational)
);

  logic rw_n, keep, load;
  logic f_q;           // stored bit, seen by the current operation

  qca_inv u_inv_rw (.a(rw), .y(rw_n));
  maj3 u_and_keep (.a(f_q),  .b(1'b0), .c(rw),   .y(keep));
  maj3 u_and_load (.a(rw_n), .b(1'b0), .c(i),    .y(load));
  maj3 u_or_f     (.a(keep), .b(1'b1), .c(load), .y(f));
  maj3 u_and_o    (.a(rw),   .b(1'b0), .c(f),    .y(o));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) f_q <= 1'b0;
    else        f_q <= f;

endmodule
