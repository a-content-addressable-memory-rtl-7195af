// qca_cam_pkg: constants and types shared by the CAM cell and the CAM array.
//
// CAM_CELL_LATENCY is the delay, in clock cycles, from the inputs of a CAM
// cell to its outputs F, O and M. Two cycles is the latency reported for the
// QCA layout of the cell; one clock cycle here stands for one full four-phase
// QCA clock period. The structs bundle the per-cell inputs and outputs that
// the cell, the array and the testbenches all pass around.
package qca_cam_pkg;

  // Latency of one CAM cell, in clock cycles (two, as reported for the layout).
  localparam int unsigned CAM_CELL_LATENCY = 2;

  // Inputs of one CAM cell.
  typedef struct packed {
    logic rw;  // 0: write I into the cell, 1: read (keep the stored bit)
    logic i;   // data input, used by a write
    logic a;   // argument bit to compare against
    logic k;   // key bit: 1 compares this bit, 0 masks it (forces a match)
  } cam_cell_in_t;

  // Outputs of one CAM cell.
  typedef struct packed {
    logic f;   // content of the cell after the operation
    logic o;   // read output: the stored bit on a read, 0 on a write
    logic m;   // match: 1 when the bit is masked or equals the argument
  } cam_cell_out_t;

endpackage
