// cam_array: WORDS x WIDTH content-addressable memory built from CAM cells.
//
// Organisation: an argument register holds the word to search for, a key
// register selects which of its bits take part in the search (1 = compare,
// 0 = don't care), and an array of WORDS words of WIDTH one-bit CAM cells
// compares the argument with every stored word at once. A word matches when
// every cell in it reports a match; the per-word results are captured in the
// match register, and a priority encoder turns that register into the
// address of the lowest-numbered matching word.
//
// Every cell of word w gets R/W = ~(write & wr_sel[w]), I = data_in[bit],
// A = argument register bit, K = key register bit. So a write stores data_in
// in each selected word, while every other word is read: it keeps its content
// and shows it on rd_data. Search runs every cycle, also during a write (the
// written word is then compared with its new content).
//
// Timing (all on rising edges of clk):
//   edge 0     arg_load/key_load capture arg_in/key_in; write/wr_sel/data_in
//              are sampled by the cells and the written words are updated.
//   edge 2     (CAM cell latency) cell outputs for the operation of edge 0.
//   edge 3     match_q holds the search result of the operation of edge 0;
//              match_addr/match_valid/match_multi follow match_q directly.
// rd_data follows the cell outputs (2 cycles after the operation); a write
// shows 0 on the written word. One search can start every cycle.
// The organisation (argument, key, array, match register) follows the usual
// CAM block structure; the word-select write port, the reset and the sizes
// are this design's own choices.
module cam_array
  import qca_cam_pkg::*;
#(
  parameter int unsigned WORDS = 8,  // M: number of words
  parameter int unsigned WIDTH = 8,  // N: bits per word
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,      // asynchronous, active low
  // argument and key registers
  input  logic                         arg_load,
  input  logic [WIDTH-1:0]             arg_in,
  input  logic                         key_load,
  input  logic [WIDTH-1:0]             key_in,
  // write port
  input  logic                         write,      // store data_in in the selected words
  input  logic [WORDS-1:0]             wr_sel,     // word select for write
  input  logic [WIDTH-1:0]             data_in,
  // results
  output logic [WORDS-1:0]             match_q,    // match register
  output logic [AW-1:0]                match_addr, // lowest matching word
  output logic                         match_valid,// at least one word matches
  output logic                         match_multi,// more than one word matches
  output logic [WORDS-1:0][WIDTH-1:0]  rd_data     // O output of every cell
);

  logic [WIDTH-1:0]            arg_q, key_q;
  logic [WORDS-1:0][WIDTH-1:0] cell_m;
  logic [WORDS-1:0]            word_match;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      arg_q <= '0;
      key_q <= '0;
    end else begin
      if (arg_load) arg_q <= arg_in;
      if (key_load) key_q <= key_in;
    end

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    logic rw;
    assign rw = ~(write & wr_sel[w]);

    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      cam_cell_in_t  cin;
      cam_cell_out_t cout;

      assign cin = '{rw: rw, i: data_in[b], a: arg_q[b], k: key_q[b]};

      cam_cell #(.LATENCY(CAM_CELL_LATENCY)) u_cell (
        .clk, .rst_n, .in(cin), .out(cout)
      );

      assign cell_m[w][b]  = cout.m;
      assign rd_data[w][b] = cout.o;
    end

    assign word_match[w] = &cell_m[w];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) match_q <= '0;
    else        match_q <= word_match;

  cam_priority_encoder #(.WORDS(WORDS)) u_enc (
    .match(match_q), .addr(match_addr), .valid(match_valid), .multi(match_multi)
  );

endmodule
