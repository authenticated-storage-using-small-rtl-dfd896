// hmac_sha1: HMAC-SHA1 with a 128-bit key over a short message (at most 55
// bytes), or a plain SHA-1 digest of such a message.
//
// Every authenticated message of the storage protocol is short: the client
// request and P-chip response HMACs (at most 53 bytes: message type, block
// ID, nonce, data hash, revision number or write-key hash) and the root-store
// messages between the P and S chips (message type, 20-byte root, nonce).
// HMAC_K(m) = H((K ^ opad) || H((K ^ ipad) || m)), the key zero-padded to 64
// bytes, costs four compressions. The two key blocks do not depend on each
// other, so they enter the pipeline back to back; the inner message block
// follows when the ipad result returns, then the outer block. With `plain`
// set, the unit returns H(m) after a single compression (used for H(Wkey)).
//
// Interface: request taken when req_valid && req_ready (req_ready is high
// only while idle, the unit holds one request at a time). done pulses with
// mac when the result is ready; about 4 x 80 cycles for an HMAC, 80 + 20 for a
// plain digest. Key handling follows RFC 2104; the scheduling is this
// design's own.
module hmac_sha1
  import abs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic               plain,
  input  logic [KEY_W-1:0]   key,
  input  logic [MSG_W-1:0]   msg,
  input  logic [LEN_W-1:0]   len,
  output logic               done,
  output logic [HASH_W-1:0]  mac
);
  typedef enum logic [2:0] {
    S_IDLE, S_IPAD, S_OPAD, S_INNER, S_OUTER, S_WAIT
  } state_e;

  localparam logic [1:0] T_IPAD = 2'd0, T_OPAD = 2'd1, T_INNER = 2'd2, T_OUTER = 2'd3;

  state_e            st_q;
  logic [KEY_W-1:0]  key_q;
  logic [MSG_W-1:0]  msg_q;
  logic [LEN_W-1:0]  len_q;
  logic              plain_q;
  logic [HASH_W-1:0] cv_i_q, cv_o_q, inner_q;
  logic              have_i_q, have_o_q, have_inner_q;

  logic              s_valid, s_ready, s_out_valid;
  logic [HASH_W-1:0] s_cv, s_out_cv;
  logic [511:0]      s_block;
  logic [1:0]        s_tag, s_out_tag;

  logic [511:0]      key_blk;
  assign key_blk = {key_q, 384'(0)};

  always_comb begin
    s_valid = 1'b0;
    s_cv    = SHA1_IV;
    s_block = '0;
    s_tag   = T_IPAD;
    unique case (st_q)
      S_IPAD:  begin
        s_valid = 1'b1;
        if (plain_q) begin
          s_block = sha1_pad(msg_q, len_q, 64'(len_q));
          s_tag   = T_OUTER;                 // a plain digest is final at once
        end else begin
          s_block = key_blk ^ {64{8'h36}};
          s_tag   = T_IPAD;
        end
      end
      S_OPAD:  begin s_valid = 1'b1; s_block = key_blk ^ {64{8'h5c}}; s_tag = T_OPAD; end
      S_INNER: begin
        s_valid = have_i_q;
        s_cv    = cv_i_q;
        s_block = sha1_pad(msg_q, len_q, 64'(len_q) + 64'd64);
        s_tag   = T_INNER;
      end
      S_OUTER: begin
        s_valid = have_o_q && have_inner_q;
        s_cv    = cv_o_q;
        s_block = sha1_pad({inner_q, 280'(0)}, LEN_W'(20), 64'd84);
        s_tag   = T_OUTER;
      end
      default: ;
    endcase
  end

  sha1_pipe #(.STAGES(4), .TAG_W(2)) u_sha (
    .clk, .rst_n,
    .in_valid (s_valid), .in_ready (s_ready),
    .in_cv    (s_cv),    .in_block (s_block), .in_tag (s_tag),
    .out_valid(s_out_valid), .out_cv (s_out_cv), .out_tag (s_out_tag)
  );

  assign req_ready = (st_q == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      key_q <= '0; msg_q <= '0; len_q <= '0; plain_q <= 1'b0;
      cv_i_q <= '0; cv_o_q <= '0; inner_q <= '0;
      have_i_q <= 1'b0; have_o_q <= 1'b0; have_inner_q <= 1'b0;
      done <= 1'b0; mac <= '0;
    end else begin
      done <= 1'b0;
      if (s_out_valid) begin
        unique case (s_out_tag)
          T_IPAD:  begin cv_i_q  <= s_out_cv; have_i_q     <= 1'b1; end
          T_OPAD:  begin cv_o_q  <= s_out_cv; have_o_q     <= 1'b1; end
          T_INNER: begin inner_q <= s_out_cv; have_inner_q <= 1'b1; end
          default: begin mac <= s_out_cv; done <= 1'b1; st_q <= S_IDLE; end
        endcase
      end
      unique case (st_q)
        S_IDLE: if (req_valid) begin
          key_q <= key; msg_q <= msg; len_q <= len; plain_q <= plain;
          have_i_q <= 1'b0; have_o_q <= 1'b0; have_inner_q <= 1'b0;
          st_q <= S_IPAD;
        end
        S_IPAD:  if (s_ready) st_q <= plain_q ? S_WAIT : S_OPAD;
        S_OPAD:  if (s_ready) st_q <= S_INNER;
        S_INNER: if (s_ready && have_i_q) st_q <= S_OUTER;
        S_OUTER: if (s_ready && have_o_q && have_inner_q) st_q <= S_WAIT;
        default: ;
      endcase
    end
  end

  initial assert (KEY_W <= 512) else $error("hmac_sha1: key longer than a block");
endmodule
