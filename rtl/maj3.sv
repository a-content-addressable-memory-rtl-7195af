// maj3: three-input majority gate, the basic QCA logic primitive.
//
// y = ab + bc + ac: the output is 1 when at least two inputs are 1. Tying one
// input to 0 turns the gate into a two-input AND, tying it to 1 into a
// two-input OR; the CAM cell uses it in both ways. Purely combinational (in a
// QCA layout the whole gate sits inside one clock zone).
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (b & c) | (a & c);

endmodule
