// tb_workload_micro: the P chip at its default size (2^20-block disk, 2^14
// tree cache, 102-entry response buffer) running, after the protocol
// scenario of the end-to-end test, a workload in the style of the
// micro-benchmarks: 48 writes (24 random within a 2048-block working set,
// i.e. 2 GB of 1 MB blocks, then 24 sequential) by two clients, the root
// stored and acknowledged after every 8 writes, then 48 certified reads.
// Every response, released response and rewritten tree node is checked
// against the model's HMACs and tree.
module tb_workload_micro;
  import abs_pkg::*;
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
  // data hash engine port idle in this test
  logic dh_valid = 0, dh_ready, dh_last = 0, dh_res_valid, dh_res_match;
  logic [1:0] dh_stream = 0, dh_res_stream;
  logic [511:0] dh_data = '0;
  logic [159:0] dh_exp_hash = '0, dh_res_hash;

  pchip_top dut (.*);
  abs_env #(.LB(LB), .RESP_DEPTH(102), .WATCHDOG(4000000), .WL_OPS(48), .WL_SET(2048)) env (
    .*, .extra_done(1'b1), .extra_checks(0), .extra_failures(0));

  // The environment ends the run; this is a second, later watchdog.
  initial begin
    repeat (4100000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
