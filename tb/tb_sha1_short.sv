// tb_sha1_short: digests of short messages (0..55 bytes, including the
// 40-byte node and 44-byte leaf sizes of the Merkle tree) against the
// reference model; four requests issued back to back to fill the pipeline,
// with tags checked.
module tb_sha1_short;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, dig_valid;
  logic [439:0] req_msg;
  logic [5:0] req_len;
  logic [3:0] req_tag, dig_tag;
  logic [159:0] digest;
  logic [159:0] exp_d [16];
  int checks = 0, failures = 0, n_out = 0;

  sha1_short dut (.*);
  always #5 clk = ~clk;

  always @(negedge clk) if (dig_valid) begin
    checks++; n_out++;
    if (digest !== exp_d[dig_tag]) begin
      failures++; $display("FAIL tag %0d got %h exp %h", dig_tag, digest, exp_d[dig_tag]);
    end
  end

  initial begin
    bytes_t m;
    int lens[8] = '{40, 44, 0, 55, 12, 1, 37, 53};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      m = {};
      for (int i = 0; i < lens[t % 8]; i++) m.push_back(8'($urandom));
      if (t == 0) m = '{8'h61, 8'h62, 8'h63};
      exp_d[t] = sha1(m);
      @(negedge clk);
      req_valid = 1; req_msg = to_msg(m); req_len = 6'(m.size()); req_tag = 4'(t);
      while (!req_ready) @(negedge clk);
      @(negedge clk); req_valid = 0;
    end
    repeat (120) @(negedge clk);
    checks++;
    if (exp_d[0] !== 160'ha9993e364706816aba3e25717850c26c9cd0d89d) failures++;
    checks++;
    if (n_out != 16) begin failures++; $display("FAIL count %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
