// tree_cache: on-chip cache of Merkle tree nodes for the Merkle tree engine.
//
// Nodes are numbered as a heap: the root is 1, the children of node i are
// 2i and 2i+1, and the leaf of block b is 2^LEAF_BITS + b. Each entry holds
// the node's full index (as a tag) and its 160-bit hash in a memory array,
// plus a valid and a verified flag in registers so that a reset empties the
// cache. The server decides which nodes to load and when; the cache decides
// only where a node may live: a node has exactly one slot, picked by its
// tree level and its low index bits. Levels shallower than BANK_BITS are
// stored whole (slot = index); every deeper level has its own bank of
// 2^BANK_BITS slots. So a node can never sit in the cache twice, and a
// parent, its two children and all nodes on a leaf-to-root path occupy
// distinct slots. This placement rule is this design's choice; it keeps a
// stale copy of an updated node from staying marked verified.
//
// Interface: one read port with a registered result (rd_en/rd_idx in one
// cycle, rd_hit/rd_verified/rd_hash the next) and one write port
// (wr_en/wr_idx/wr_hash/wr_verified, written at the clock edge). root is the
// hash held for node 1 and root_valid says whether it was written.
module tree_cache
  import abs_pkg::*;
#(
  parameter int unsigned LEAF_BITS  = 20,
  parameter int unsigned CACHE_BITS = 14,
  parameter int unsigned BANK_BITS  = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rd_en,
  input  logic [LEAF_BITS:0]   rd_idx,
  output logic                 rd_hit,
  output logic                 rd_verified,
  output logic [HASH_W-1:0]    rd_hash,
  input  logic                 wr_en,
  input  logic [LEAF_BITS:0]   wr_idx,
  input  logic [HASH_W-1:0]    wr_hash,
  input  logic                 wr_verified,
  output logic [HASH_W-1:0]    root,
  output logic                 root_valid
);
  localparam int unsigned IDX_W   = LEAF_BITS + 1;
  localparam int unsigned ENTRIES = 1 << CACHE_BITS;

  typedef struct packed {
    logic [IDX_W-1:0]  tag;
    logic [HASH_W-1:0] hash;
  } entry_t;

  entry_t             mem [ENTRIES];
  logic [ENTRIES-1:0] valid_q, verified_q;
  logic [IDX_W-1:0]   rd_idx_q;
  entry_t             rd_entry_q;
  logic               rd_valid_q, rd_ver_q;

  // Slot of a node index.
  function automatic logic [CACHE_BITS-1:0] slot(input logic [IDX_W-1:0] idx);
    int unsigned lvl;
    logic [CACHE_BITS-1:0] bank;
    lvl = 0;
    for (int i = 0; i < IDX_W; i++) if (idx[i]) lvl = i;
    if (lvl < BANK_BITS) return CACHE_BITS'(idx);
    bank = CACHE_BITS'(lvl - BANK_BITS + 1);
    return (bank << BANK_BITS) | CACHE_BITS'(idx[BANK_BITS-1:0]);
  endfunction

  logic [CACHE_BITS-1:0] rd_slot, wr_slot;
  assign rd_slot = slot(rd_idx);
  assign wr_slot = slot(wr_idx);

  // Memory array: no reset, read through a registered port.
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_slot] <= '{tag: wr_idx, hash: wr_hash};
    if (rd_en) rd_entry_q   <= mem[rd_slot];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= '0;
      verified_q <= '0;
      rd_idx_q   <= '0;
      rd_valid_q <= 1'b0;
      rd_ver_q   <= 1'b0;
      root       <= '0;
      root_valid <= 1'b0;
    end else begin
      if (rd_en) begin
        rd_idx_q   <= rd_idx;
        rd_valid_q <= valid_q[rd_slot];
        rd_ver_q   <= verified_q[rd_slot];
      end
      if (wr_en) begin
        valid_q[wr_slot]    <= 1'b1;
        verified_q[wr_slot] <= wr_verified;
        if (wr_idx == IDX_W'(1)) begin
          root       <= wr_hash;
          root_valid <= 1'b1;
        end
      end
    end
  end

  assign rd_hit      = rd_valid_q && (rd_entry_q.tag == rd_idx_q);
  assign rd_verified = rd_hit && rd_ver_q;
  assign rd_hash     = rd_entry_q.hash;

  initial assert (((LEAF_BITS - BANK_BITS + 2) << BANK_BITS) <= ENTRIES)
    else $error("tree_cache: banks do not fit in 2^CACHE_BITS entries");
endmodule
