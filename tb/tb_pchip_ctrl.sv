// tb_pchip_ctrl: the P-chip control logic on a 64-block disk with a small
// tree cache and a 4-entry response buffer, driven through the whole storage
// protocol by the client/server/S-chip model.
module tb_pchip_ctrl;
  import abs_pkg::*;
  localparam int LB = 6;
  logic clk, rst_n, cmd_valid, cmd_ready, cmd_done, integrity_err, resp_valid, resp_ready;
  logic node_valid, root_out_valid, store_pending;
  logic [127:0] sk;
  pchip_cmd_t cmd;
  err_e cmd_err;
  resp_t resp;
  logic [LB:0] node_idx;
  logic [159:0] node_hash, root_out, root_out_mac;
  logic [15:0] held_count;

  pchip_ctrl #(.LEAF_BITS(LB), .CACHE_BITS(6), .BANK_BITS(3), .RESP_DEPTH(4)) dut (.*);
  abs_env #(.LB(LB), .RESP_DEPTH(4), .WATCHDOG(400000)) env (
    .*, .extra_done(1'b1), .extra_checks(0), .extra_failures(0));
endmodule
