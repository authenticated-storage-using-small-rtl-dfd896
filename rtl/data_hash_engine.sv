// data_hash_engine: hashes the data blocks of clients' writes and checks each
// against the hash H(data) the client sent with its request.
//
// The server streams each storage block to the P chip in 64-byte words. Each
// word is one SHA-1 compression, chained on the previous result of the same
// block; after the last word the engine adds the padding block (0x80, zeros,
// and the length in bits), which needs no byte counter because storage
// blocks are whole multiples of 64 bytes (1 MB in the evaluated system). The
// result is compared with the client's hash; a mismatch tells the server to
// discard the speculatively buffered data.
//
// The compressions of one block form a chain, so a single block keeps only
// one stage of the 4-stage SHA-1 pipeline busy. To fill the pipeline the
// engine hashes up to STREAMS blocks at once, interleaved: each stream has
// its own chaining value, expected hash and word count, and the pipeline tag
// says which stream (and whether it is the padding block) a result belongs
// to. With STREAMS = 4 one compression can enter every 20 cycles; a stream
// takes its next word when its previous one has left the pipeline (about
// 100 cycles), so four busy streams move 4 x 64 bytes per 100-120 cycles
// (roughly 270-320 MB/s at 125 MHz) where one stream alone gets a quarter.
//
// Interface: blk_valid/blk_ready handshake for each 512-bit word, blk_stream
// selects the stream, blk_last marks the final word of a block, exp_hash is
// sampled with a stream's first word. blk_ready is low while the addressed
// stream still has a word in the pipeline, and padding blocks go before new
// data words. res_valid pulses with res_stream, res_hash and res_match when
// a stream's padding block completes; the stream is then free for a new
// block. The pipeline depth follows the prototype's hash engine; the number
// of streams and the interface are this design's choices.
module data_hash_engine
  import abs_pkg::*;
#(
  parameter int unsigned STREAMS = 4,
  localparam int unsigned SW     = (STREAMS > 1) ? $clog2(STREAMS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               blk_valid,
  output logic               blk_ready,
  input  logic [SW-1:0]      blk_stream,
  input  logic [511:0]       blk_data,
  input  logic               blk_last,
  input  logic [HASH_W-1:0]  exp_hash,
  output logic               res_valid,
  output logic [SW-1:0]      res_stream,
  output logic [HASH_W-1:0]  res_hash,
  output logic               res_match
);
  localparam int unsigned TW = SW + 1;   // tag: {padding block, stream}

  logic [HASH_W-1:0]  cv_q   [STREAMS];
  logic [HASH_W-1:0]  exp_q  [STREAMS];
  logic [63:0]        nblk_q [STREAMS];  // 64-byte words hashed so far
  logic [STREAMS-1:0] first_q, busy_q, last_q, pad_q;

  logic              s_valid, s_ready, s_out_valid;
  logic [511:0]      s_block;
  logic [HASH_W-1:0] s_cv_in, s_out_cv;
  logic [TW-1:0]     s_tag, s_out_tag;

  // Lowest stream waiting for its padding block.
  logic              pad_any;
  logic [SW-1:0]     pad_s;
  always_comb begin
    pad_any = 1'b0;
    pad_s   = '0;
    for (int i = STREAMS - 1; i >= 0; i--)
      if (pad_q[i]) begin pad_any = 1'b1; pad_s = SW'(i); end
  end

  logic in_ok;   // the addressed stream can take a data word
  assign in_ok     = (32'(blk_stream) < STREAMS) && !busy_q[blk_stream] && !pad_q[blk_stream];
  assign blk_ready = s_ready && !pad_any && in_ok;

  always_comb begin
    if (pad_any) begin
      s_valid = 1'b1;
      s_tag   = {1'b1, pad_s};
      s_cv_in = cv_q[pad_s];
      s_block = {8'h80, 440'(0), nblk_q[pad_s] << 9};
    end else begin
      s_valid = blk_valid && in_ok;
      s_tag   = {1'b0, blk_stream};
      s_cv_in = first_q[blk_stream] ? SHA1_IV : cv_q[blk_stream];
      s_block = blk_data;
    end
  end

  sha1_pipe #(.STAGES(4), .TAG_W(TW)) u_sha (
    .clk, .rst_n,
    .in_valid (s_valid), .in_ready (s_ready),
    .in_cv    (s_cv_in), .in_block (s_block), .in_tag (s_tag),
    .out_valid(s_out_valid), .out_cv (s_out_cv), .out_tag (s_out_tag)
  );

  logic [SW-1:0] o_s;
  assign o_s = s_out_tag[SW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STREAMS; i++) begin
        cv_q[i] <= '0; exp_q[i] <= '0; nblk_q[i] <= '0;
      end
      first_q <= '1; busy_q <= '0; last_q <= '0; pad_q <= '0;
      res_valid <= 1'b0; res_stream <= '0; res_hash <= '0; res_match <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      // retire: a compression leaves the pipeline
      if (s_out_valid) begin
        busy_q[o_s] <= 1'b0;
        if (s_out_tag[SW]) begin
          res_valid    <= 1'b1;
          res_stream   <= o_s;
          res_hash     <= s_out_cv;
          res_match    <= (s_out_cv == exp_q[o_s]);
          first_q[o_s] <= 1'b1;
        end else begin
          cv_q[o_s] <= s_out_cv;
          if (last_q[o_s]) pad_q[o_s] <= 1'b1;
        end
      end
      // issue: a padding block or a data word enters the pipeline; its
      // stream is not busy, so it is never the stream retiring above
      if (s_valid && s_ready) begin
        if (pad_any) begin
          pad_q[pad_s]  <= 1'b0;
          busy_q[pad_s] <= 1'b1;
        end else begin
          if (first_q[blk_stream]) begin
            exp_q[blk_stream]  <= exp_hash;
            nblk_q[blk_stream] <= 64'd1;
          end else nblk_q[blk_stream] <= nblk_q[blk_stream] + 1'b1;
          first_q[blk_stream] <= 1'b0;
          last_q[blk_stream]  <= blk_last;
          busy_q[blk_stream]  <= 1'b1;
        end
      end
    end
  end

  // Only a stream with a compression in flight can get a result back.
  always_ff @(posedge clk) begin
    if (rst_n && s_out_valid) assert (busy_q[o_s]);
  end
endmodule
