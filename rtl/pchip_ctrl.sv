// pchip_ctrl: control logic of the P chip.
//
// Executes the server's commands one at a time, sequencing the session cache,
// the HMAC unit, the AES engine, the Merkle tree engine and the response
// buffer:
//   OP_SESSION  store a session key (delivered already decrypted: the RSA
//               unwrap of {Skey}_PubEK is outside this RTL).
//   OP_BOOT     install the root hash restored from the S chip; accepted once
//               after reset.
//   OP_LOAD / OP_VERIFY  passed to the Merkle tree engine.
//   OP_READ     certifyRead: check HMAC_Skey(MT_CP0||Bid||n), certify the
//               leaf argument (H(data), Vid, H(Wkey)) against the verified
//               tree, answer HMAC_Skey(MT_PC0||Bid||n||H(data)||Vid). The
//               answer is held if the block has a held write.
//   OP_WRITE    write access control: check HMAC_Skey(MT_CP1||Bid||n||
//               H(data*)||H(Wkey*)); decrypt {Wkey||Vid'}_Skey; certify the
//               current leaf argument; require H(Wkey) = leaf's H(Wkey)
//               (otherwise the write is unauthorized: integrity signal, no
//               answer); if Vid' = Vid+1 update the leaf to
//               H(data*)||Vid'||H(Wkey*) and answer HMAC_Skey(MT_PC1||Bid||n||
//               H(data*)) (always held), else answer the current Vid with
//               HMAC_Skey(MT_PC2||Bid||n||Vid).
//   OP_STORE    storeRoot: with the S chip's nonce n, send the root s and
//               HMAC_SK(MT_PS1||s||n), and seal the response buffer.
//   OP_ACK      accept the S chip's acknowledgment only if it equals
//               HMAC_SK(MT_SP1||s||n); then release the sealed responses.
// Any failed check ends the command with an error code; a failed check on
// untrusted data (tree hash, leaf, request HMAC, write key, acknowledgment)
// also raises integrity_err. A read or write that arrives while the response
// buffer is full is refused with ERR_FULL before it changes anything.
//
// Interface: cmd_valid/cmd_ready (ready while idle), cmd_done/cmd_err when a
// command ends. Responses leave through the response buffer (resp_*). The
// message layouts (one-byte types, big-endian fields) and the single-command
// sequencing are this design's choices; the checks and messages are the
// protocol's.
module pchip_ctrl
  import abs_pkg::*;
#(
  parameter int unsigned LEAF_BITS  = 20,
  parameter int unsigned CACHE_BITS = 14,
  parameter int unsigned BANK_BITS  = 10,
  parameter int unsigned RESP_DEPTH = 102
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [KEY_W-1:0]    sk,          // key shared with the S chip
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
  output logic [15:0]         held_count
);
  localparam logic [2:0] M_LOAD = 3'd0, M_VERIFY = 3'd1, M_CERTIFY = 3'd2,
                         M_UPDATE = 3'd3, M_BOOT = 3'd4;

  typedef enum logic [4:0] {
    S_IDLE, S_SES, S_MAC, S_MAC_WAIT, S_MK, S_MK_WAIT,
    S_R_CHKREQ, S_R_RESP, S_PREP, S_PUSH,
    S_W_CHKREQ, S_W_HKEY, S_W_CHKKEY, S_W_RESP,
    S_ST_OUT, S_A_CHK, S_FIN
  } state_e;

  state_e             st_q, ret_q;
  pchip_cmd_t         c_q;
  logic [KEY_W-1:0]   skey_q;
  logic               booted_q, pend_q;
  logic [HASH_W-1:0]  s_q;
  logic [NONCE_W-1:0] n_q;
  err_e               err_q;
  logic [HASH_W-1:0]  mac_res_q;
  logic               hold_q;
  resp_t              resp_q;
  logic [VID_W-1:0]   vidp_q;
  logic [WKEY_W-1:0]  wkey_q;

  // ---------------------------------------------------------------- session cache
  logic             ses_rd_valid;
  logic [KEY_W-1:0] ses_key;
  session_cache u_ses (
    .clk, .rst_n,
    .wr_en   (st_q == S_IDLE && cmd_valid && cmd.op == OP_SESSION),
    .wr_valid(1'b1), .wr_sid(cmd.sid), .wr_key(cmd.token),
    .rd_en   (st_q == S_IDLE && cmd_valid), .rd_sid(cmd.sid),
    .rd_key  (ses_key), .rd_valid(ses_rd_valid)
  );

  // ---------------------------------------------------------------- HMAC unit
  logic               mac_ready, mac_done, mac_plain_q;
  logic [KEY_W-1:0]   mac_key_q;
  logic [MSG_W-1:0]   mac_msg_q;
  logic [LEN_W-1:0]   mac_len_q;
  logic [HASH_W-1:0]  mac;
  hmac_sha1 u_mac (
    .clk, .rst_n,
    .req_valid(st_q == S_MAC), .req_ready(mac_ready), .plain(mac_plain_q),
    .key(mac_key_q), .msg(mac_msg_q), .len(mac_len_q), .done(mac_done), .mac
  );

  // ---------------------------------------------------------------- AES engine
  logic         aes_start, aes_busy, aes_done, aes_have_q;
  logic [127:0] aes_pt;
  assign aes_start = (st_q == S_SES) && (c_q.op == OP_WRITE);
  aes128_dec u_aes (
    .clk, .rst_n, .start(aes_start), .key(ses_key), .ct(c_q.token),
    .busy(aes_busy), .done(aes_done), .pt(aes_pt)
  );

  // ---------------------------------------------------------------- Merkle engine
  logic            mk_ready, mk_done, mk_ok;
  err_e            mk_err;
  logic [2:0]      mk_op_q;
  leaf_arg_t       mk_arg_q;
  logic [HASH_W-1:0] root;
  logic            root_valid;
  merkle_engine #(.LEAF_BITS(LEAF_BITS), .CACHE_BITS(CACHE_BITS), .BANK_BITS(BANK_BITS)) u_mk (
    .clk, .rst_n,
    .cmd_valid(st_q == S_MK), .cmd_ready(mk_ready), .cmd_op(mk_op_q),
    .cmd_idx(c_q.node_idx[LEAF_BITS:0]), .cmd_bid(c_q.bid), .cmd_hash(c_q.node_hash),
    .cmd_arg(mk_arg_q),
    .done(mk_done), .ok(mk_ok), .err(mk_err),
    .node_valid, .node_idx, .node_hash, .root, .root_valid
  );

  // ---------------------------------------------------------------- response buffer
  logic rb_in_ready, rb_pending, rb_seal, rb_release;
  resp_buffer #(.DEPTH(RESP_DEPTH)) u_rb (
    .clk, .rst_n,
    .in_valid(st_q == S_PUSH), .in_ready(rb_in_ready), .in_resp(resp_q), .in_hold(hold_q),
    .q_bid(c_q.bid), .q_pending(rb_pending),
    .seal(rb_seal), .release_i(rb_release),
    .out_valid(resp_valid), .out_ready(resp_ready), .out_resp(resp), .count(held_count)
  );
  assign rb_seal    = (st_q == S_ST_OUT);
  assign rb_release = (st_q == S_A_CHK) && (mac_res_q == c_q.hmac);

  assign cmd_ready     = (st_q == S_IDLE);
  assign store_pending = pend_q;

  // Message builders (left aligned in MSG_W bits).
  function automatic logic [MSG_W-1:0] m_req_r(input pchip_cmd_t c);
    return {MT_CP0, c.bid, c.nonce, 336'(0)};
  endfunction
  function automatic logic [MSG_W-1:0] m_resp_r(input pchip_cmd_t c);
    return {MT_PC0, c.bid, c.nonce, c.leaf_arg.hdata, c.leaf_arg.vid, 144'(0)};
  endfunction
  function automatic logic [MSG_W-1:0] m_req_w(input pchip_cmd_t c);
    return {MT_CP1, c.bid, c.nonce, c.hdata_new, c.hwkey_new, 16'(0)};
  endfunction
  function automatic logic [MSG_W-1:0] m_resp_w1(input pchip_cmd_t c);
    return {MT_PC1, c.bid, c.nonce, c.hdata_new, 176'(0)};
  endfunction
  function automatic logic [MSG_W-1:0] m_resp_w2(input pchip_cmd_t c);
    return {MT_PC2, c.bid, c.nonce, c.leaf_arg.vid, 304'(0)};
  endfunction
  function automatic logic [MSG_W-1:0] m_root(input mt_e t, input logic [HASH_W-1:0] s,
                                              input logic [NONCE_W-1:0] n);
    return {t, s, n, 208'(0)};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; ret_q <= S_IDLE; c_q <= '0; skey_q <= '0;
      booted_q <= 1'b0; pend_q <= 1'b0; s_q <= '0; n_q <= '0; err_q <= ERR_NONE;
      mac_res_q <= '0; hold_q <= 1'b0; resp_q <= '0; vidp_q <= '0; wkey_q <= '0;
      mac_plain_q <= 1'b0; mac_key_q <= '0; mac_msg_q <= '0; mac_len_q <= '0;
      mk_op_q <= '0; mk_arg_q <= '0; aes_have_q <= 1'b0;
      cmd_done <= 1'b0; cmd_err <= ERR_NONE; integrity_err <= 1'b0;
      root_out_valid <= 1'b0; root_out <= '0; root_out_mac <= '0;
    end else begin
      cmd_done       <= 1'b0;
      integrity_err  <= 1'b0;
      root_out_valid <= 1'b0;
      if (aes_done) begin
        aes_have_q <= 1'b1;
        {wkey_q, vidp_q} <= aes_pt;
      end
      unique case (st_q)
        S_IDLE: if (cmd_valid) begin
          c_q <= cmd; err_q <= ERR_NONE; aes_have_q <= 1'b0;
          unique case (cmd.op)
            OP_SESSION: st_q <= S_FIN;
            OP_BOOT: begin
              if (booted_q) begin err_q <= ERR_CMD; st_q <= S_FIN; end
              else begin booted_q <= 1'b1; mk_op_q <= M_BOOT; ret_q <= S_FIN; st_q <= S_MK; end
            end
            OP_LOAD:   begin mk_op_q <= M_LOAD;   ret_q <= S_FIN; st_q <= S_MK; end
            OP_VERIFY: begin mk_op_q <= M_VERIFY; ret_q <= S_FIN; st_q <= S_MK; end
            OP_READ, OP_WRITE: begin
              // A full buffer could not take the answer: refuse before any
              // state changes, so that storeRoot and the ack still get in.
              if (held_count >= 16'(RESP_DEPTH)) begin err_q <= ERR_FULL; st_q <= S_FIN; end
              else st_q <= S_SES;
            end
            OP_STORE: begin
              if (pend_q || !root_valid) begin err_q <= ERR_CMD; st_q <= S_FIN; end
              else begin
                s_q <= root; n_q <= cmd.nonce;
                mac_plain_q <= 1'b0; mac_key_q <= sk;
                mac_msg_q <= m_root(MT_PS1, root, cmd.nonce); mac_len_q <= LEN_W'(29);
                ret_q <= S_ST_OUT; st_q <= S_MAC;
              end
            end
            OP_ACK: begin
              if (!pend_q) begin err_q <= ERR_CMD; st_q <= S_FIN; end
              else begin
                mac_plain_q <= 1'b0; mac_key_q <= sk;
                mac_msg_q <= m_root(MT_SP1, s_q, n_q); mac_len_q <= LEN_W'(29);
                ret_q <= S_A_CHK; st_q <= S_MAC;
              end
            end
            default: begin err_q <= ERR_CMD; st_q <= S_FIN; end
          endcase
        end

        // Session key visible; check the request HMAC.
        S_SES: begin
          skey_q <= ses_key;
          if (!ses_rd_valid) begin err_q <= ERR_SESSION; st_q <= S_FIN; end
          else begin
            mac_plain_q <= 1'b0; mac_key_q <= ses_key;
            if (c_q.op == OP_READ) begin
              mac_msg_q <= m_req_r(c_q); mac_len_q <= LEN_W'(13); ret_q <= S_R_CHKREQ;
            end else begin
              mac_msg_q <= m_req_w(c_q); mac_len_q <= LEN_W'(53); ret_q <= S_W_CHKREQ;
            end
            st_q <= S_MAC;
          end
        end

        // Generic calls: HMAC unit and Merkle engine.
        S_MAC: if (mac_ready) st_q <= S_MAC_WAIT;
        S_MAC_WAIT: if (mac_done) begin mac_res_q <= mac; st_q <= ret_q; end
        S_MK: if (mk_ready) st_q <= S_MK_WAIT;
        S_MK_WAIT: if (mk_done) begin
          if (!mk_ok) begin err_q <= mk_err; st_q <= S_FIN; end
          else st_q <= ret_q;
        end

        // ---------------- certifyRead
        S_R_CHKREQ: begin
          if (mac_res_q != c_q.hmac) begin err_q <= ERR_REQ_HMAC; st_q <= S_FIN; end
          else begin
            mk_op_q <= M_CERTIFY; mk_arg_q <= c_q.leaf_arg; ret_q <= S_R_RESP; st_q <= S_MK;
          end
        end
        S_R_RESP: begin
          mac_key_q <= skey_q; mac_msg_q <= m_resp_r(c_q); mac_len_q <= LEN_W'(37);
          resp_q.kind <= RK_READ; resp_q.vid <= c_q.leaf_arg.vid;
          ret_q <= S_PREP; st_q <= S_MAC;
        end
        // Complete the response; hold it if it is a write or if the block
        // has a held write.
        S_PREP: begin
          resp_q.sid <= c_q.sid; resp_q.bid <= c_q.bid; resp_q.hmac <= mac_res_q;
          hold_q <= (resp_q.kind == RK_WRITE) || rb_pending;
          st_q <= S_PUSH;
        end
        S_PUSH: if (rb_in_ready) st_q <= S_FIN;

        // ---------------- update (write access control)
        S_W_CHKREQ: begin
          if (mac_res_q != c_q.hmac) begin err_q <= ERR_REQ_HMAC; st_q <= S_FIN; end
          else begin
            mk_op_q <= M_CERTIFY; mk_arg_q <= c_q.leaf_arg; ret_q <= S_W_HKEY; st_q <= S_MK;
          end
        end
        S_W_HKEY: if (aes_have_q) begin         // H(Wkey) of the decrypted key
          mac_plain_q <= 1'b1; mac_msg_q <= {wkey_q, 344'(0)}; mac_len_q <= LEN_W'(12);
          ret_q <= S_W_CHKKEY; st_q <= S_MAC;
        end
        S_W_CHKKEY: begin
          mac_plain_q <= 1'b0; mac_key_q <= skey_q;
          if (mac_res_q != c_q.leaf_arg.hwkey) begin err_q <= ERR_WKEY; st_q <= S_FIN; end
          else if (vidp_q != c_q.leaf_arg.vid + 1'b1) begin
            mac_msg_q <= m_resp_w2(c_q); mac_len_q <= LEN_W'(17);
            resp_q.kind <= RK_BADVID; resp_q.vid <= c_q.leaf_arg.vid;
            ret_q <= S_PREP; st_q <= S_MAC;
          end else begin
            mk_op_q  <= M_UPDATE;
            mk_arg_q <= '{hdata: c_q.hdata_new, vid: vidp_q, hwkey: c_q.hwkey_new};
            ret_q <= S_W_RESP; st_q <= S_MK;
          end
        end
        S_W_RESP: begin
          mac_msg_q <= m_resp_w1(c_q); mac_len_q <= LEN_W'(33);
          resp_q.kind <= RK_WRITE; resp_q.vid <= vidp_q;
          ret_q <= S_PREP; st_q <= S_MAC;
        end

        // ---------------- root hash storage protocol
        S_ST_OUT: begin
          root_out_valid <= 1'b1; root_out <= s_q; root_out_mac <= mac_res_q;
          pend_q <= 1'b1;
          st_q <= S_FIN;
        end
        S_A_CHK: begin
          if (mac_res_q != c_q.hmac) err_q <= ERR_ACK;
          else pend_q <= 1'b0;
          st_q <= S_FIN;
        end

        S_FIN: begin
          cmd_done      <= 1'b1;
          cmd_err       <= err_q;
          integrity_err <= is_integrity(err_q);
          st_q          <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  logic unused_busy;
  assign unused_busy = aes_busy;
endmodule
