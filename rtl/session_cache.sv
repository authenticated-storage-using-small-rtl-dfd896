// session_cache: session keys of the open client sessions.
//
// Each client session has its own HMAC key Skey, which the P chip also uses
// as the AES key of the session's write-access tokens. The cache maps a
// session ID to its key. It is a memory of 2^SID_W keys with a valid flag
// per session (flags in registers, cleared by reset), written when a session
// is created (wr_valid = 1) or closed (wr_valid = 0).
//
// Interface: write at the clock edge; read registered, rd_sid in one cycle,
// rd_key/rd_valid the next. The number of sessions is this design's choice.
module session_cache
  import abs_pkg::*;
#(
  parameter int unsigned SID_BITS = SID_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic                wr_valid,
  input  logic [SID_BITS-1:0] wr_sid,
  input  logic [KEY_W-1:0]    wr_key,
  input  logic                rd_en,
  input  logic [SID_BITS-1:0] rd_sid,
  output logic [KEY_W-1:0]    rd_key,
  output logic                rd_valid
);
  localparam int unsigned N = 1 << SID_BITS;
  logic [KEY_W-1:0] mem [N];
  logic [N-1:0]     valid_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_sid] <= wr_key;
    if (rd_en) rd_key      <= mem[rd_sid];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      rd_valid <= 1'b0;
    end else begin
      if (rd_en) rd_valid <= valid_q[rd_sid] && !(wr_en && wr_sid == rd_sid && !wr_valid);
      if (wr_en) valid_q[wr_sid] <= wr_valid;
    end
  end
endmodule
