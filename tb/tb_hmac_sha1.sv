// tb_hmac_sha1: checks HMAC-SHA1 and the plain-digest mode against the
// reference model and against RFC 2202 test case 2 (key "Jefe", which is the
// same HMAC key as "Jefe" followed by twelve zero bytes). Random keys,
// messages and lengths 0..55 follow; the HMAC latency is bounded.
module tb_hmac_sha1;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, plain = 0, done;
  logic [127:0] key;
  logic [439:0] msg;
  logic [5:0] len;
  logic [159:0] mac;
  int checks = 0, failures = 0;

  hmac_sha1 dut (.*);
  always #5 clk = ~clk;

  task automatic run(input bytes_t k, input bytes_t m, input bit pl, input logic [159:0] exp);
    int cyc;
    @(negedge clk);
    key = '0;
    foreach (k[i]) key[127-8*i -: 8] = k[i];
    msg = to_msg(m); len = 6'(m.size()); plain = pl; req_valid = 1;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    cyc = 0;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (!done || mac !== exp) begin
      failures++; $display("FAIL plain=%0d len=%0d got %h exp %h", pl, m.size(), mac, exp);
    end
    checks++;
    if (cyc > (pl ? 120 : 400)) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    bytes_t k, m;
    string s;
    repeat (3) @(negedge clk);
    rst_n = 1;
    k = '{8'h4a, 8'h65, 8'h66, 8'h65};
    s = "what do ya want for nothing?";
    m = {};
    for (int i = 0; i < s.len(); i++) m.push_back(s[i]);
    run(k, m, 0, 160'heffcdf6ae5eb2fa2d27416d5f184df9c259a7c79);
    checks++;
    if (hmac(k, m) !== 160'heffcdf6ae5eb2fa2d27416d5f184df9c259a7c79) begin
      failures++; $display("FAIL reference hmac");
    end
    m = '{8'h61, 8'h62, 8'h63};
    run(k, m, 1, 160'ha9993e364706816aba3e25717850c26c9cd0d89d);
    for (int t = 0; t < 12; t++) begin
      int n;
      k = {}; m = {};
      for (int i = 0; i < 16; i++) k.push_back(8'($urandom));
      n = (t == 0) ? 55 : (t == 1) ? 0 : int'($urandom_range(0, 55));
      for (int i = 0; i < n; i++) m.push_back(8'($urandom));
      if (t % 3 == 2) run(k, m, 1, sha1(m));
      else            run(k, m, 0, hmac(k, m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
