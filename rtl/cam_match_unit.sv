// cam_match_unit: the matching half of the QCA CAM cell.
//
// Compares the cell content F with the argument bit A under the key bit K:
//   OR1 = maj(F,  A,  1)           F | A
//   OR2 = maj(~F, ~A, 1)           ~F | ~A
//   M   = min(OR1, OR2, K, 0, 0)   ~(OR1 & OR2 & K) = ~(K & (F ^ A))
// OR1 & OR2 is F xor A, so M is 1 when K = 0 (bit masked) or when A equals F,
// and 0 only for a compared bit that differs. Purely combinational.
module cam_match_unit (
  input  logic f,   // cell content
  input  logic a,   // argument bit
  input  logic k,   // key (mask) bit
  output logic m    // match
);

  logic f_n, a_n, or_fa, or_fa_n;

  qca_inv u_inv_f (.a(f), .y(f_n));
  qca_inv u_inv_a (.a(a), .y(a_n));
  maj3 u_or_pos (.a(f),   .b(a),   .c(1'b1), .y(or_fa));
  maj3 u_or_neg (.a(f_n), .b(a_n), .c(1'b1), .y(or_fa_n));
  min5 u_min    (.a(or_fa), .b(1'b0), .c(1'b0), .d(or_fa_n), .e(k), .y(m));

endmodule
