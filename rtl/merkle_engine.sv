// merkle_engine: Merkle tree engine of the P chip.
//
// The whole Merkle tree over the disk lives on the untrusted server; the
// engine keeps some nodes in its tree cache and treats every cached node
// marked verified as trusted, so a verified node acts as a local root. The
// server's tree controller chooses what is cached, and the engine checks
// every command so that a lying server is caught:
//   LOAD    (idx, h)   put node idx in the cache, unverified. The root (node 1)
//                      cannot be loaded.
//   VERIFY  (p)        parent p must be cached and verified, children 2p and
//                      2p+1 cached; if H(h_2p || h_2p+1) equals h_p both
//                      children become verified, otherwise integrity error.
//   CERTIFY (b, arg)   the leaf of block b must be cached and verified and
//                      equal H(leaf_arg); used to certify reads and to check
//                      the current leaf of a write.
//   UPDATE  (b, arg*)  write leaf* = H(leaf_arg*) and recompute every node on
//                      the path to the root from the verified siblings. All
//                      siblings are checked first, so a failing UPDATE changes
//                      nothing. Each rewritten node is also sent out
//                      (node_valid/node_idx/node_hash) so that the server can
//                      keep its copy of the tree current.
//   BOOT    (h)        install the root hash restored from the S chip.
// Leaf arguments are leaf_arg = H(data) || Vid || H(Wkey) (44 bytes); an
// inner node is H(left || right) (40 bytes). Both fit one SHA-1 block.
//
// Interface: cmd_valid/cmd_ready handshake (ready only when idle); done
// pulses with ok and err when the command ends. One command at a time, and
// one hash at a time: an UPDATE of a tree with LEAF_BITS levels below the
// root costs LEAF_BITS cache reads for the check, then LEAF_BITS+1 hashes of
// about 100 cycles each. The command set, the check rules and the path
// update follow the design; the exact checks for LOAD and the sequential
// order of the work are this design's choices.
module merkle_engine
  import abs_pkg::*;
#(
  parameter int unsigned LEAF_BITS  = 20,
  parameter int unsigned CACHE_BITS = 14,
  parameter int unsigned BANK_BITS  = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic [2:0]           cmd_op,       // merkle_op_e
  input  logic [LEAF_BITS:0]   cmd_idx,      // node index (LOAD, VERIFY)
  input  logic [BID_W-1:0]     cmd_bid,      // block (CERTIFY, UPDATE)
  input  logic [HASH_W-1:0]    cmd_hash,     // node (LOAD) or root (BOOT)
  input  leaf_arg_t            cmd_arg,      // leaf argument (CERTIFY, UPDATE)
  output logic                 done,
  output logic                 ok,
  output err_e                 err,
  output logic                 node_valid,
  output logic [LEAF_BITS:0]   node_idx,
  output logic [HASH_W-1:0]    node_hash,
  output logic [HASH_W-1:0]    root,
  output logic                 root_valid
);
  localparam int unsigned IDX_W = LEAF_BITS + 1;
  localparam logic [2:0] M_LOAD = 3'd0, M_VERIFY = 3'd1, M_CERTIFY = 3'd2,
                         M_UPDATE = 3'd3, M_BOOT = 3'd4;

  typedef enum logic [4:0] {
    S_IDLE,
    S_WRITE_ONE,                       // LOAD / BOOT
    S_V_RDP, S_V_RDL, S_V_RDR, S_V_CAP, S_V_HASH, S_V_WAIT, S_V_WRL, S_V_WRR,
    S_C_RD, S_C_CAP, S_C_HASH, S_C_WAIT,
    S_U_RD, S_U_CAP, S_U_SRD, S_U_SCAP, S_U_LHASH, S_U_LWAIT,
    S_U_NRD, S_U_NCAP, S_U_NHASH, S_U_NWAIT, S_U_WR,
    S_DONE
  } state_e;

  state_e              st_q;
  logic [2:0]          op_q;
  logic [IDX_W-1:0]    idx_q, cur_q;
  logic [HASH_W-1:0]   hash_q, a_q, b_q, val_q;
  leaf_arg_t           arg_q;
  logic                ok_q;
  err_e                err_q;

  // tree cache
  logic                c_rd_en, c_hit, c_ver, c_wr_en, c_wr_ver;
  logic [IDX_W-1:0]    c_rd_idx, c_wr_idx;
  logic [HASH_W-1:0]   c_hash, c_wr_hash;

  tree_cache #(.LEAF_BITS(LEAF_BITS), .CACHE_BITS(CACHE_BITS), .BANK_BITS(BANK_BITS)) u_cache (
    .clk, .rst_n,
    .rd_en(c_rd_en), .rd_idx(c_rd_idx), .rd_hit(c_hit), .rd_verified(c_ver), .rd_hash(c_hash),
    .wr_en(c_wr_en), .wr_idx(c_wr_idx), .wr_hash(c_wr_hash), .wr_verified(c_wr_ver),
    .root, .root_valid
  );

  // hash unit
  logic                h_valid, h_ready, h_done;
  logic [MSG_W-1:0]    h_msg;
  logic [LEN_W-1:0]    h_len;
  logic [HASH_W-1:0]   h_dig;
  logic [3:0]          h_tag_out;

  sha1_short #(.TAG_W(4)) u_hash (
    .clk, .rst_n,
    .req_valid(h_valid), .req_ready(h_ready), .req_msg(h_msg), .req_len(h_len), .req_tag(4'd0),
    .dig_valid(h_done), .digest(h_dig), .dig_tag(h_tag_out)
  );

  logic [IDX_W-1:0] leaf_idx;
  assign leaf_idx = {1'b1, cmd_bid[LEAF_BITS-1:0]};

  // Combinational requests to the cache and the hash unit.
  always_comb begin
    c_rd_en = 1'b0; c_rd_idx = cur_q;
    c_wr_en = 1'b0; c_wr_idx = cur_q; c_wr_hash = val_q; c_wr_ver = 1'b1;
    h_valid = 1'b0; h_msg = '0; h_len = '0;
    unique case (st_q)
      S_WRITE_ONE: begin
        c_wr_en = 1'b1; c_wr_idx = idx_q; c_wr_hash = hash_q; c_wr_ver = (op_q == M_BOOT);
      end
      S_V_RDP: begin c_rd_en = 1'b1; c_rd_idx = idx_q; end
      S_V_RDL: begin c_rd_en = 1'b1; c_rd_idx = {idx_q[IDX_W-2:0], 1'b0}; end
      S_V_RDR: begin c_rd_en = 1'b1; c_rd_idx = {idx_q[IDX_W-2:0], 1'b1}; end
      S_V_HASH: begin h_valid = 1'b1; h_msg = {a_q, b_q, 120'(0)}; h_len = LEN_W'(40); end
      S_V_WRL: begin c_wr_en = 1'b1; c_wr_idx = {idx_q[IDX_W-2:0], 1'b0}; c_wr_hash = a_q; end
      S_V_WRR: begin c_wr_en = 1'b1; c_wr_idx = {idx_q[IDX_W-2:0], 1'b1}; c_wr_hash = b_q; end
      S_C_RD, S_U_RD: begin c_rd_en = 1'b1; c_rd_idx = idx_q; end
      S_C_HASH, S_U_LHASH: begin h_valid = 1'b1; h_msg = {arg_q, 88'(0)}; h_len = LEN_W'(44); end
      S_U_SRD, S_U_NRD: begin c_rd_en = 1'b1; c_rd_idx = cur_q ^ IDX_W'(1); end
      S_U_NHASH: begin
        h_valid = 1'b1; h_len = LEN_W'(40);
        h_msg = cur_q[0] ? {b_q, val_q, 120'(0)} : {val_q, b_q, 120'(0)};
      end
      S_U_WR: begin c_wr_en = 1'b1; c_wr_idx = cur_q; c_wr_hash = val_q; end
      default: ;
    endcase
  end

  assign cmd_ready = (st_q == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; op_q <= '0; idx_q <= '0; cur_q <= '0;
      hash_q <= '0; a_q <= '0; b_q <= '0; val_q <= '0; arg_q <= '0;
      ok_q <= 1'b0; err_q <= ERR_NONE;
      done <= 1'b0; ok <= 1'b0; err <= ERR_NONE;
      node_valid <= 1'b0; node_idx <= '0; node_hash <= '0;
    end else begin
      done       <= 1'b0;
      node_valid <= 1'b0;
      unique case (st_q)
        S_IDLE: if (cmd_valid) begin
          op_q <= cmd_op; hash_q <= cmd_hash; arg_q <= cmd_arg;
          ok_q <= 1'b1; err_q <= ERR_NONE;
          unique case (cmd_op)
            M_LOAD: begin
              idx_q <= cmd_idx;
              if (cmd_idx <= IDX_W'(1)) begin ok_q <= 1'b0; err_q <= ERR_CMD; st_q <= S_DONE; end
              else st_q <= S_WRITE_ONE;
            end
            M_BOOT: begin idx_q <= IDX_W'(1); st_q <= S_WRITE_ONE; end
            M_VERIFY: begin
              idx_q <= cmd_idx;
              if (cmd_idx == '0 || cmd_idx[LEAF_BITS]) begin
                ok_q <= 1'b0; err_q <= ERR_CMD; st_q <= S_DONE;
              end else st_q <= S_V_RDP;
            end
            M_CERTIFY, M_UPDATE: begin
              idx_q <= leaf_idx; cur_q <= leaf_idx;
              if (cmd_bid >> LEAF_BITS != '0) begin
                ok_q <= 1'b0; err_q <= ERR_CMD; st_q <= S_DONE;
              end else st_q <= (cmd_op == M_CERTIFY) ? S_C_RD : S_U_RD;
            end
            default: begin ok_q <= 1'b0; err_q <= ERR_CMD; st_q <= S_DONE; end
          endcase
        end

        S_WRITE_ONE: st_q <= S_DONE;

        // ---------------- VERIFY
        S_V_RDP: st_q <= S_V_RDL;
        S_V_RDL: begin                          // parent result visible
          hash_q <= c_hash;
          if (!c_ver) begin ok_q <= 1'b0; err_q <= ERR_TREE_MISS; st_q <= S_DONE; end
          else st_q <= S_V_RDR;
        end
        S_V_RDR: begin                          // left result visible
          a_q <= c_hash;
          if (!c_hit) begin ok_q <= 1'b0; err_q <= ERR_TREE_MISS; st_q <= S_DONE; end
          else st_q <= S_V_CAP;
        end
        S_V_CAP: begin                          // right result visible
          b_q <= c_hash;
          if (!c_hit) begin ok_q <= 1'b0; err_q <= ERR_TREE_MISS; st_q <= S_DONE; end
          else st_q <= S_V_HASH;
        end
        S_V_HASH: if (h_ready) st_q <= S_V_WAIT;
        S_V_WAIT: if (h_done) begin
          if (h_dig == hash_q) st_q <= S_V_WRL;
          else begin ok_q <= 1'b0; err_q <= ERR_TREE_HASH; st_q <= S_DONE; end
        end
        S_V_WRL: st_q <= S_V_WRR;
        S_V_WRR: st_q <= S_DONE;

        // ---------------- CERTIFY
        S_C_RD: st_q <= S_C_CAP;
        S_C_CAP: begin
          hash_q <= c_hash;
          if (!c_ver) begin ok_q <= 1'b0; err_q <= ERR_TREE_MISS; st_q <= S_DONE; end
          else st_q <= S_C_HASH;
        end
        S_C_HASH: if (h_ready) st_q <= S_C_WAIT;
        S_C_WAIT: if (h_done) begin
          if (h_dig != hash_q) begin ok_q <= 1'b0; err_q <= ERR_LEAF; end
          st_q <= S_DONE;
        end

        // ---------------- UPDATE: check leaf and all siblings first
        S_U_RD: st_q <= S_U_CAP;
        S_U_CAP: begin
          if (!c_ver) begin ok_q <= 1'b0; err_q <= ERR_TREE_MISS; st_q <= S_DONE; end
          else st_q <= S_U_SRD;
        end
        S_U_SRD: st_q <= S_U_SCAP;
        S_U_SCAP: begin
          if (!c_ver) begin ok_q <= 1'b0; err_q <= ERR_TREE_MISS; st_q <= S_DONE; end
          else if ((cur_q >> 1) == IDX_W'(1)) begin
            cur_q <= idx_q; st_q <= S_U_LHASH;  // whole path checked
          end else begin
            cur_q <= cur_q >> 1; st_q <= S_U_SRD;
          end
        end
        S_U_LHASH: if (h_ready) st_q <= S_U_LWAIT;
        S_U_LWAIT: if (h_done) begin val_q <= h_dig; st_q <= S_U_WR; end
        S_U_WR: begin
          node_valid <= 1'b1; node_idx <= cur_q; node_hash <= val_q;
          st_q <= (cur_q == IDX_W'(1)) ? S_DONE : S_U_NRD;
        end
        S_U_NRD: st_q <= S_U_NCAP;
        S_U_NCAP: begin b_q <= c_hash; st_q <= S_U_NHASH; end
        S_U_NHASH: if (h_ready) st_q <= S_U_NWAIT;
        S_U_NWAIT: if (h_done) begin
          val_q <= h_dig; cur_q <= cur_q >> 1; st_q <= S_U_WR;
        end

        S_DONE: begin
          done <= 1'b1; ok <= ok_q; err <= err_q;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  logic [3:0] unused_tag;
  assign unused_tag = h_tag_out;
endmodule
