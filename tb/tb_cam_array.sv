// tb_cam_array: end-to-end self-checking test of the CAM array at its
// default size (no parameter overrides).
//
// Random cycles load the argument and key registers, write words, and search.
// The testbench keeps its own copy of the memory contents and of the two
// registers. For the operation of each cycle it computes the expected match
// vector (a word matches when it equals the argument in every bit whose key
// bit is 1) and the expected read data (0 for a written word, the content
// otherwise), and checks them CAM_CELL_LATENCY + 1 and CAM_CELL_LATENCY
// cycles later, which also checks the latency of both paths.
// Arguments are usually copies of stored words with a few bits flipped, and
// some writes go to several words at once, so that single matches, multiple
// matches, no match and matches only due to masked bits all occur. The
// returned address must point at the lowest-numbered matching word. Each of
// those events, plus writes, reads and a write that hits a match in the
// same cycle, is counted and must happen at least once.
module tb_cam_array;
  import qca_cam_pkg::*;

  localparam int unsigned WORDS = 8;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned NOPS  = 4000;

  logic clk = 1'b0;
  logic rst_n;
  logic arg_load, key_load, write;
  logic [WIDTH-1:0] arg_in, key_in, data_in;
  logic [WORDS-1:0] wr_sel;
  logic [WORDS-1:0] match_q;
  logic [$clog2(WORDS)-1:0] match_addr;
  logic match_valid, match_multi;
  logic [WORDS-1:0][WIDTH-1:0] rd_data;

  // reference state
  logic [WIDTH-1:0] mem [WORDS];
  logic [WIDTH-1:0] arg_r, key_r;
  logic [WORDS-1:0] exp_match_q[$];
  logic [WORDS-1:0][WIDTH-1:0] exp_rd_q[$];

  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_single = 0, n_multi = 0, n_none = 0;
  int n_masked_hit = 0, n_write_hit = 0, n_arg_load = 0, n_key_load = 0;

  cam_array dut (
    .clk, .rst_n, .arg_load, .arg_in, .key_load, .key_in,
    .write, .wr_sel, .data_in, .match_q, .match_addr,
    .match_valid, .match_multi, .rd_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NOPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle: drive, model, clock, check
  task automatic cycle();
    logic [WORDS-1:0] em;
    logic [WORDS-1:0][WIDTH-1:0] erd;
    logic [WIDTH-1:0] pick;
    int hits;

    // stimulus
    pick     = mem[$urandom_range(0, WORDS - 1)];
    arg_load = ($urandom_range(0, 3) == 0);
    case ($urandom_range(0, 3))
      0:       arg_in = WIDTH'($urandom);                                    // unrelated value
      1:       arg_in = pick;                                                // a stored word
      default: arg_in = pick ^ (WIDTH'(1) << $urandom_range(0, WIDTH - 1));  // one bit off
    endcase
    key_load = ($urandom_range(0, 5) == 0);
    key_in   = ($urandom_range(0, 1) == 0) ? '1 : WIDTH'($urandom);
    write    = ($urandom_range(0, 4) == 0);
    wr_sel   = ($urandom_range(0, 3) == 0) ? WORDS'($urandom) : (WORDS'(1) << $urandom_range(0, WORDS - 1));
    data_in  = ($urandom_range(0, 1) == 0) ? WIDTH'($urandom) : mem[$urandom_range(0, WORDS - 1)];

    // model of this cycle's operation (registers as they were before the edge)
    for (int w = 0; w < WORDS; w++) begin
      logic wr;
      wr = write && wr_sel[w];
      if (wr) mem[w] = data_in;
      erd[w] = wr ? '0 : mem[w];
      em[w]  = ((mem[w] ^ arg_r) & key_r) == '0;
      if (wr) n_write++; else n_read++;
      if (em[w] && ((mem[w] ^ arg_r) != '0)) n_masked_hit++;
      if (em[w] && wr) n_write_hit++;
    end
    hits = $countones(em);
    if (hits == 0) n_none++; else if (hits == 1) n_single++; else n_multi++;
    exp_match_q.push_back(em);
    exp_rd_q.push_back(erd);
    if (arg_load) begin arg_r = arg_in; n_arg_load++; end
    if (key_load) begin key_r = key_in; n_key_load++; end

    @(posedge clk);
    @(negedge clk);

    // read data appears CAM_CELL_LATENCY cycles after the operation,
    // the match register one cycle later
    if (exp_rd_q.size() > CAM_CELL_LATENCY - 1) begin
      logic [WORDS-1:0][WIDTH-1:0] x;
      x = exp_rd_q.pop_front();
      checks++;
      if (rd_data !== x) begin
        failures++;
        $display("FAIL rd_data %h expected %h", rd_data, x);
      end
    end
    if (exp_match_q.size() > CAM_CELL_LATENCY) begin
      logic [WORDS-1:0] x;
      x = exp_match_q.pop_front();
      checks++;
      if (match_q !== x) begin
        failures++;
        $display("FAIL match_q %b expected %b", match_q, x);
      end
      // returned location: lowest matching word
      checks++;
      if (match_valid !== (x != '0) || match_multi !== ($countones(x) > 1) ||
          (x != '0 && !x[match_addr])) begin
        failures++;
        $display("FAIL match address %0d valid=%b multi=%b for %b", match_addr, match_valid, match_multi, x);
      end
      for (int w = 0; w < WORDS; w++)
        if (x[w] && w < int'(match_addr)) begin
          failures++;
          $display("FAIL match address %0d skips lower word %0d", match_addr, w);
        end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    arg_load = 1'b0; key_load = 1'b0; write = 1'b0;
    arg_in = '0; key_in = '0; data_in = '0; wr_sel = '0;
    foreach (mem[w]) mem[w] = '0;
    arg_r = '0; key_r = '0;
    @(negedge clk);
    @(negedge clk);
    // match and read outputs are cleared by reset; their pipelines start empty
    checks++;
    if (match_q !== '0 || rd_data !== '0) begin
      failures++;
      $display("FAIL reset values");
    end
    rst_n = 1'b1;
    for (int s = 0; s < CAM_CELL_LATENCY - 1; s++) exp_rd_q.push_back('0);
    for (int s = 0; s < CAM_CELL_LATENCY; s++) exp_match_q.push_back('0);
    for (int n = 0; n < NOPS; n++) cycle();

    $display("writes=%0d reads=%0d arg_loads=%0d key_loads=%0d single=%0d multi=%0d none=%0d masked_hit=%0d write_hit=%0d",
             n_write, n_read, n_arg_load, n_key_load, n_single, n_multi, n_none, n_masked_hit, n_write_hit);
    checks++;
    if (n_write == 0 || n_read == 0 || n_arg_load == 0 || n_key_load == 0 ||
        n_single == 0 || n_multi == 0 || n_none == 0 || n_masked_hit == 0 || n_write_hit == 0) begin
      failures++;
      $display("FAIL some mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
