// qca_inv: QCA inverter.
//
// The output is the complement of the input. In QCA the inversion comes from
// placing the output cells diagonally to the input cells; logically it is a
// plain NOT gate. Purely combinational.
module qca_inv (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
