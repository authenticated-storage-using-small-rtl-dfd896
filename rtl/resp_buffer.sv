// resp_buffer: response buffer of the root hash storage protocol.
//
// A write changes the root hash, but the change is only safe once the S chip
// has stored the new root in its NVRAM, and that takes tens of milliseconds.
// The P chip therefore keeps working, but holds back every response that
// would let a client believe an unsaved state: the response to a write, and
// the response to any request on a block written by a write whose response is
// still held. Other responses pass straight through.
//
// Held responses are kept in a FIFO in the order they were made. seal marks
// the moment the P chip sends the root hash to the S chip: everything in the
// FIFO at that moment is covered by that root. release (a valid S-chip
// acknowledgment) frees everything up to the last seal; those entries then
// leave the FIFO one per cycle. The counters are absolute, so a second seal
// before the release simply covers more entries.
//
// Interface: in_valid/in_ready/in_resp/in_hold push a response (in_ready is
// low while the FIFO is full or while released entries are still draining,
// which stalls the control logic). q_bid/q_pending: is block q_bid written by
// a held write? out_valid/out_ready/out_resp: responses leaving the chip.
// DEPTH defaults to 102, a 2 KB buffer of 20-byte HMACs. The FIFO
// organisation and the counters are this design's choices.
module resp_buffer
  import abs_pkg::*;
#(
  parameter int unsigned DEPTH = 102
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  resp_t              in_resp,
  input  logic               in_hold,
  input  logic [BID_W-1:0]   q_bid,
  output logic               q_pending,
  input  logic               seal,
  input  logic               release_i,
  output logic               out_valid,
  input  logic               out_ready,
  output resp_t              out_resp,
  output logic [15:0]        count
);
  localparam int unsigned PW = $clog2(DEPTH);

  resp_t            buf_q [DEPTH];
  logic [DEPTH-1:0] used_q;
  logic [PW-1:0]    wp_q, rp_q;
  logic [31:0]      wr_cnt_q, rd_cnt_q, seal_cnt_q, rel_cnt_q;
  logic             full, draining, push, pop;

  assign count    = 16'(wr_cnt_q - rd_cnt_q);
  assign full     = (wr_cnt_q - rd_cnt_q) == 32'(DEPTH);
  assign draining = (rd_cnt_q != rel_cnt_q);

  // Released entries first; a response that needs no holding goes straight
  // out when nothing drains.
  always_comb begin
    out_valid = 1'b0;
    out_resp  = in_resp;
    in_ready  = 1'b0;
    push      = 1'b0;
    pop       = 1'b0;
    if (draining) begin
      out_valid = 1'b1;
      out_resp  = buf_q[rp_q];
      pop       = out_ready;
    end else if (in_valid && !in_hold) begin
      out_valid = 1'b1;
      in_ready  = out_ready;
    end
    if (in_valid && in_hold && !full) begin
      in_ready = 1'b1;
      push     = 1'b1;
    end
  end

  always_comb begin
    q_pending = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (used_q[i] && buf_q[i].kind == RK_WRITE && buf_q[i].bid == q_bid) q_pending = 1'b1;
  end

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) if (push) buf_q[wp_q] <= in_resp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_q <= '0; wp_q <= '0; rp_q <= '0;
      wr_cnt_q <= '0; rd_cnt_q <= '0; seal_cnt_q <= '0; rel_cnt_q <= '0;
    end else begin
      if (push) begin
        used_q[wp_q] <= 1'b1;
        wp_q         <= nxt(wp_q);
        wr_cnt_q     <= wr_cnt_q + 1;
      end
      if (pop) begin
        used_q[rp_q] <= 1'b0;
        rp_q         <= nxt(rp_q);
        rd_cnt_q     <= rd_cnt_q + 1;
      end
      if (seal)      seal_cnt_q <= wr_cnt_q + 32'(push);
      if (release_i) rel_cnt_q  <= seal_cnt_q;
    end
  end

  // A seal and its release never arrive together, and the FIFO never overflows.
  assert property (@(posedge clk) disable iff (!rst_n) !(seal && release_i));
  assert property (@(posedge clk) disable iff (!rst_n) (wr_cnt_q - rd_cnt_q) <= 32'(DEPTH));
endmodule
