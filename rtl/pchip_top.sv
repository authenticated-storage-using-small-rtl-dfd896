// pchip_top: the P chip of an authenticated block storage server.
//
// An untrusted server stores a large virtual disk for many clients. This chip
// (paired with a small S chip holding the root hash in NVRAM) is the trusted
// part: it keeps a Merkle tree root over the whole disk, verifies the tree
// nodes the server shows it, authenticates every read and write response to
// the client with the client's session key, enforces write access and
// revision numbers, and holds back responses until the S chip has stored the
// root hash that covers them.
//
// The top joins the control logic (which contains the session cache, HMAC
// unit, AES engine, Merkle tree engine with its tree cache, and response
// buffer) with the data hash engine, which checks a written block against
// the client's hash in parallel with the rest of the request.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   sk                      key shared with the S chip (from pairing)
//   cmd_valid/ready, cmd    server commands (abs_pkg::pchip_cmd_t)
//   cmd_done, cmd_err       end of each command and its error code
//   integrity_err           integrity check signal
//   resp_valid/ready, resp  authenticated responses for the clients
//   node_valid/idx/hash     tree nodes rewritten by a write, for the server
//   root_out_valid/root_out/root_out_mac   root hash s and HMAC_SK(MT_PS1||s||n)
//   store_pending, held_count              state of the root storage protocol
//   dh_*                    data hash engine: word stream (dh_stream picks one of
//                           four interleaved blocks) and per-block result
// Defaults: a 2^20-block disk (1 TB of 1 MB blocks), a 2^14-entry tree
// cache, a 102-entry (2 KB of HMACs) response buffer.
module pchip_top
  import abs_pkg::*;
#(
  parameter int unsigned LEAF_BITS  = 20,
  parameter int unsigned CACHE_BITS = 14,
  parameter int unsigned BANK_BITS  = 10,
  parameter int unsigned RESP_DEPTH = 102
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [KEY_W-1:0]    sk,
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  pchip_cmd_t          cmd,
  output logic                cmd_done,
  output err_e                cmd_err,
  output logic                integrity_err,
  output logic                resp_valid,
  input  logic                resp_ready,
  output resp_t               resp,
  output logic                node_valid,
  output logic [LEAF_BITS:0]  node_idx,
  output logic [HASH_W-1:0]   node_hash,
  output logic                root_out_valid,
  output logic [HASH_W-1:0]   root_out,
  output logic [HASH_W-1:0]   root_out_mac,
  output logic                store_pending,
  output logic [15:0]         held_count,
  input  logic                dh_valid,
  output logic                dh_ready,
  input  logic [1:0]          dh_stream,
  input  logic [511:0]        dh_data,
  input  logic                dh_last,
  input  logic [HASH_W-1:0]   dh_exp_hash,
  output logic                dh_res_valid,
  output logic [1:0]          dh_res_stream,
  output logic [HASH_W-1:0]   dh_res_hash,
  output logic                dh_res_match
);
  pchip_ctrl #(
    .LEAF_BITS(LEAF_BITS), .CACHE_BITS(CACHE_BITS), .BANK_BITS(BANK_BITS), .RESP_DEPTH(RESP_DEPTH)
  ) u_ctrl (
    .clk, .rst_n, .sk, .cmd_valid, .cmd_ready, .cmd, .cmd_done, .cmd_err, .integrity_err,
    .resp_valid, .resp_ready, .resp, .node_valid, .node_idx, .node_hash,
    .root_out_valid, .root_out, .root_out_mac, .store_pending, .held_count
  );

  data_hash_engine #(.STREAMS(4)) u_dh (
    .clk, .rst_n,
    .blk_valid(dh_valid), .blk_ready(dh_ready), .blk_stream(dh_stream), .blk_data(dh_data),
    .blk_last(dh_last), .exp_hash(dh_exp_hash),
    .res_valid(dh_res_valid), .res_stream(dh_res_stream), .res_hash(dh_res_hash),
    .res_match(dh_res_match)
  );
endmodule
