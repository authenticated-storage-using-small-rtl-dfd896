// sha1_short: SHA-1 digest of a short message (at most 55 bytes) on the
// 4-stage SHA-1 pipeline.
//
// Every hash the Merkle tree engine needs is short: an inner node is
// H(h_2i || h_2i+1) (40 bytes) and a leaf is H(leaf_arg) with
// leaf_arg = H(data) || Vid || H(Wkey) (44 bytes). Such a message pads into a
// single 512-bit block, so its digest is one compression from the SHA-1
// initial value. This module pads the message and feeds the pipeline; the
// tag travels with the request, so up to four digests can be in flight.
//
// Interface: req_msg holds the message left aligned (byte 0 in the top
// bits), req_len its length in bytes. A request is taken when req_valid and
// req_ready are high (req_ready is high one cycle in 20). dig_valid pulses
// 80 cycles later with digest and the request's tag.
module sha1_short
  import abs_pkg::*;
#(
  parameter int unsigned TAG_W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [MSG_W-1:0]   req_msg,
  input  logic [LEN_W-1:0]   req_len,
  input  logic [TAG_W-1:0]   req_tag,
  output logic               dig_valid,
  output logic [HASH_W-1:0]  digest,
  output logic [TAG_W-1:0]   dig_tag
);
  sha1_pipe #(.STAGES(4), .TAG_W(TAG_W)) u_sha (
    .clk, .rst_n,
    .in_valid (req_valid),
    .in_ready (req_ready),
    .in_cv    (SHA1_IV),
    .in_block (sha1_pad(req_msg, req_len, 64'(req_len))),
    .in_tag   (req_tag),
    .out_valid(dig_valid),
    .out_cv   (digest),
    .out_tag  (dig_tag)
  );

endmodule
