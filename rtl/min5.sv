// min5: five-input minority gate.
//
// The five-input majority gate followed by an inverter on its output: y is 1
// when at most two of the inputs a..e are 1. With two inputs tied to 0 it
// gives the NAND of the other three, which is how the CAM matching unit uses
// it. Purely combinational.
module min5 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic y
);

  logic maj;

  maj5 u_maj (.a, .b, .c, .d, .e, .y(maj));
  qca_inv u_inv (.a(maj), .y);

endmodule
