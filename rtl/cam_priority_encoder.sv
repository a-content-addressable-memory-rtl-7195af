// cam_priority_encoder: turns the CAM match vector into a word address.
//
// A content-addressable memory answers a search with the location of the
// stored word that equals the key. This encoder takes the per-word match
// vector and returns the index of the lowest-numbered matching word in addr,
// with valid = 1 when at least one word matches (addr is 0 otherwise).
// When several words match, the lowest index wins and multi flags that more
// than one matched. Lowest-index priority is this design's own choice.
// Purely combinational.
module cam_priority_encoder #(
  parameter int unsigned WORDS = 8,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic [WORDS-1:0] match,
  output logic [AW-1:0]    addr,
  output logic             valid,
  output logic             multi
);

  always_comb begin
    addr = '0;
    for (int w = WORDS - 1; w >= 0; w--)
      if (match[w]) addr = AW'(w);
  end

  assign valid = |match;
  assign multi = (match & (match - WORDS'(1))) != '0;

endmodule
