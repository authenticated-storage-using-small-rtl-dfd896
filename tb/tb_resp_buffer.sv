// tb_resp_buffer: held and pass-through responses of the root hash storage
// protocol. Pass-through responses leave at once; held writes make their
// block pending; only entries covered by a seal leave on the release, in
// order; entries pushed after the seal wait for the next seal and release;
// a full buffer refuses further held responses.
module tb_resp_buffer;
  import abs_pkg::*;
  localparam int D = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_hold = 0, q_pending, seal = 0, release_i = 0, out_valid, out_ready = 1;
  resp_t in_resp, out_resp;
  logic [31:0] q_bid;
  logic [15:0] count;
  int checks = 0, failures = 0;
  resp_t got [$];

  resp_buffer #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_resp);

  function automatic resp_t mk(input resp_kind_e k, input int bid);
    resp_t r;
    r.kind = k; r.sid = 8'(bid); r.bid = 32'(bid); r.vid = 32'(bid * 3);
    r.hmac = {5{32'(bid)}};
    return r;
  endfunction

  task automatic push(input resp_t r, input bit hold, input bit exp_take);
    int n;
    @(negedge clk);
    in_valid = 1; in_resp = r; in_hold = hold;
    #1;
    n = 0;
    while (!in_ready && n < 3) begin @(negedge clk); n++; end
    checks++;
    if ((n < 3) !== exp_take) begin failures++; $display("FAIL push bid %0d taken=%0d", r.bid, n < 3); end
    @(posedge clk); #1 in_valid = 0;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic expect_out(input int bids[$]);
    repeat (D + 4) @(negedge clk);
    checks++;
    if (got.size() != bids.size()) begin
      failures++; $display("FAIL out count %0d exp %0d", got.size(), bids.size());
    end else
      foreach (bids[i]) begin
        checks++;
        if (got[i].bid != bids[i] || got[i] !== mk(got[i].kind, bids[i])) begin
          failures++; $display("FAIL out %0d bid %0d exp %0d", i, got[i].bid, bids[i]);
        end
      end
    got = {};
  endtask

  task automatic pend(input int bid, input bit exp);
    @(negedge clk); q_bid = 32'(bid); #1;
    checks++;
    if (q_pending !== exp) begin failures++; $display("FAIL pending %0d", bid); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); got = {};
    push(mk(RK_READ, 1), 0, 1);                 // straight through
    expect_out('{1});
    push(mk(RK_WRITE, 10), 1, 1);
    push(mk(RK_WRITE, 11), 1, 1);
    pend(10, 1); pend(11, 1); pend(12, 0);
    push(mk(RK_READ, 10), 1, 1);                // read of a pending block, held
    expect_out('{});
    pulse(seal);                                // root covers 10, 11, read 10
    push(mk(RK_WRITE, 12), 1, 1);               // after the seal
    push(mk(RK_READ, 2), 0, 1);                 // unrelated read passes
    expect_out('{2});
    pulse(release_i);
    expect_out('{10, 11, 10});
    pend(10, 0); pend(12, 1);
    checks++; if (count != 1) begin failures++; $display("FAIL count %0d", count); end
    for (int i = 0; i < D - 1; i++) push(mk(RK_WRITE, 20 + i), 1, 1);
    push(mk(RK_WRITE, 30), 1, 0);               // full
    pulse(seal);
    pulse(release_i);
    expect_out('{12, 20, 21, 22, 23, 24});
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
