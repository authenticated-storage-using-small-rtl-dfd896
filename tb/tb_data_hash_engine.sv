// tb_data_hash_engine: streams data blocks of 1 to 9 words (64 bytes each)
// through the engine and checks every digest against the reference SHA-1 and
// the match flag (every third block carries a corrupted client hash). First
// one block at a time on one stream, then several blocks on all four
// streams at once, interleaved word by word. The rate check: four streams
// with equal blocks finish in well under twice the time one stream needs
// for one such block, i.e. the pipeline stages really overlap.
module tb_data_hash_engine;
  import tb_ref_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst_n = 0;
  logic blk_valid = 0, blk_ready, blk_last = 0, res_valid, res_match;
  logic [1:0] blk_stream = 0, res_stream;
  logic [511:0] blk_data;
  logic [159:0] exp_hash, res_hash;
  int checks = 0, failures = 0;

  data_hash_engine dut (.*);
  always #5 clk = ~clk;

  typedef struct { logic [511:0] data; logic last; logic [159:0] exp; } word_t;
  typedef struct { logic [159:0] hash; logic match; } res_t;
  word_t words [NS][$];
  res_t  want  [NS][$];
  int    nres = 0;

  // Queue one block of nw words on stream s.
  task automatic add_block(input int s, input int nw, input bit bad);
    bytes_t m;
    logic [159:0] h;
    word_t w;
    m = {};
    for (int i = 0; i < 64 * nw; i++) m.push_back(8'($urandom));
    h = sha1(m);
    for (int k = 0; k < nw; k++) begin
      for (int j = 0; j < 64; j++) w.data[511-8*j -: 8] = m[64*k+j];
      w.last = (k == nw - 1);
      w.exp  = bad ? h ^ 160'h1 : h;
      words[s].push_back(w);
    end
    want[s].push_back('{hash: h, match: !bad});
  endtask

  // Each cycle offer the word of the first stream (round-robin start) that
  // the engine will take, until every queue is empty.
  task automatic drive();
    int s = 0;
    forever begin
      bit any = 0, took = 0;
      for (int i = 0; i < NS; i++) if (words[i].size() != 0) any = 1;
      if (!any) break;
      @(negedge clk);
      for (int i = 0; i < NS && !took; i++) begin
        int c = (s + i) % NS;
        if (words[c].size() != 0) begin
          blk_stream = 2'(c);
          blk_data   = words[c][0].data;
          blk_last   = words[c][0].last;
          exp_hash   = words[c][0].exp;
          blk_valid  = 1;
          #1;
          if (blk_ready) begin
            took = 1;
            @(posedge clk); #1;
            void'(words[c].pop_front());
            s = (c + 1) % NS;
          end
        end
      end
      blk_valid = 0;
    end
  endtask

  always @(posedge clk) if (rst_n && res_valid) begin : check_result
    res_t r;
    checks++;
    if (want[res_stream].size() == 0) begin
      failures++; $display("FAIL unexpected result on stream %0d", res_stream);
    end else begin
      r = want[res_stream].pop_front();
      if (res_hash !== r.hash || res_match !== r.match) begin
        failures++;
        $display("FAIL stream %0d hash %h exp %h match %0d", res_stream, res_hash, r.hash, res_match);
      end
    end
    nres++;
  end

  task automatic wait_results(input int n);
    while (nres < n) @(negedge clk);
  endtask

  initial begin
    longint t0, t1, t4;
    int nexp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    nexp = 0;
    // one block at a time
    for (int t = 0; t < 6; t++) begin
      add_block(0, t == 0 ? 1 : int'($urandom_range(1, 9)), t % 3 == 2);
      drive(); nexp++; wait_results(nexp);
    end
    // timing of a single 6-word block
    t0 = $time / 10;
    add_block(1, 6, 0); drive(); nexp++; wait_results(nexp);
    t1 = $time / 10 - t0;
    // the same size on all four streams together
    t0 = $time / 10;
    for (int s = 0; s < NS; s++) add_block(s, 6, 0);
    drive(); nexp += NS; wait_results(nexp);
    t4 = $time / 10 - t0;
    checks++;
    if (t4 * 2 > t1 * 3) begin
      failures++; $display("FAIL four streams took %0d cycles, one took %0d", t4, t1);
    end
    $display("one 6-word block: %0d cycles, four at once: %0d cycles", t1, t4);
    // random mixture on all streams
    for (int k = 0; k < 12; k++) add_block(k % NS, int'($urandom_range(1, 9)), k % 3 == 1);
    drive(); nexp += 12; wait_results(nexp);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (want[s].size() != 0) begin failures++; $display("FAIL stream %0d results missing", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
