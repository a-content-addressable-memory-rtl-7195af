// maj5: five-input majority gate.
//
// The output is 1 when three or more of the inputs a..e are 1, i.e. the OR of
// all ten three-input products (abc + abd + ... + cde). The gate is written as
// that sum of products, not as a population count, so that it reads like the
// defining equation. The QCA layout it models is a square of voter cells with
// the five inputs on its sides and one output cell; that geometry has no
// counterpart in RTL. Purely combinational.
module maj5 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic y
);

  always_comb
    y = (a & b & c) | (a & b & d) | (a & b & e) | (a & c & d) | (a & c & e) |
        (a & d & e) | (b & c & d) | (b & c & e) | (b & d & e) | (c & d & e);

endmodule
