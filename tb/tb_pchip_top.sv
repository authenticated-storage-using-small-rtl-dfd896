// tb_pchip_top: end-to-end test of the P chip at its default size (2^20-block
// disk, 2^14-entry tree cache, 102-entry response buffer). The client,
// server and S-chip model runs the whole storage protocol (sessions, boot,
// LOAD/VERIFY, certified reads, writes with access control, held and passed
// responses, root storage with forged and valid acknowledgments, a full
// response buffer). Meanwhile the data hash engine checks the data of 1 MB
// blocks shortened to a few 64-byte words, once with the right client hash
// and once with a wrong one.
module tb_pchip_top;
  import abs_pkg::*;
  import tb_ref_pkg::*;
  localparam int LB = 20;
  logic clk, rst_n, cmd_valid, cmd_ready, cmd_done, integrity_err, resp_valid, resp_ready;
  logic node_valid, root_out_valid, store_pending;
  logic [127:0] sk;
  pchip_cmd_t cmd;
  err_e cmd_err;
  resp_t resp;
  logic [LB:0] node_idx;
  logic [159:0] node_hash, root_out, root_out_mac;
  logic [15:0] held_count;
  logic dh_valid = 0, dh_ready, dh_last = 0, dh_res_valid, dh_res_match;
  logic [1:0] dh_stream = 0, dh_res_stream;
  logic [511:0] dh_data;
  logic [159:0] dh_exp_hash, dh_res_hash;
  logic dh_done = 0;
  int dh_checks = 0, dh_failures = 0;

  pchip_top dut (.*);
  abs_env #(.LB(LB), .RESP_DEPTH(102), .WATCHDOG(3000000)) env (
    .*, .extra_done(dh_done), .extra_checks(dh_checks), .extra_failures(dh_failures));

  initial begin
    bytes_t m;
    logic [159:0] h;
    int nw;
    wait (rst_n === 1'b1);
    for (int t = 0; t < 2; t++) begin
      nw = 4 + t;
      m = {};
      for (int i = 0; i < 64 * nw; i++) m.push_back(8'($urandom));
      h = sha1(m);
      dh_exp_hash = t ? ~h : h;
      dh_stream = 2'(2 * t + 1);
      for (int w = 0; w < nw; w++) begin
        @(negedge clk);
        for (int j = 0; j < 64; j++) dh_data[511-8*j -: 8] = m[64*w+j];
        dh_last = (w == nw - 1); dh_valid = 1;
        #1;
        while (!dh_ready) begin @(negedge clk); #1; end
        @(posedge clk); #1 dh_valid = 0;
      end
      while (!dh_res_valid) @(negedge clk);
      dh_checks++;
      if (dh_res_hash !== h || dh_res_match !== (t == 0) || dh_res_stream !== dh_stream) begin
        dh_failures++; $display("FAIL data hash %0d", t);
      end
    end
    dh_done = 1;
  end
endmodule
