// tb_merkle_engine: runs the Merkle tree engine on a 16-leaf tree against a
// full reference tree kept in the testbench. Covers: BOOT of the root;
// CERTIFY of an uncached leaf (miss); LOAD and VERIFY down a path; CERTIFY
// with the right and a wrong leaf argument; VERIFY of a tampered node; UPDATE
// of a leaf with every rewritten node and the new root checked; a replay of
// the stale leaf (caught by VERIFY); UPDATE with a sibling missing (refused,
// root unchanged); LOAD of the root (refused).
module tb_merkle_engine;
  import abs_pkg::*;
  import tb_ref_pkg::*;
  localparam int LB = 4;
  localparam int NL = 1 << LB;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, done, ok, node_valid, root_valid;
  logic [2:0] cmd_op;
  logic [LB:0] cmd_idx, node_idx;
  logic [31:0] cmd_bid;
  logic [159:0] cmd_hash, node_hash, root;
  leaf_arg_t cmd_arg;
  err_e err;
  int checks = 0, failures = 0;

  merkle_engine #(.LEAF_BITS(LB), .CACHE_BITS(5), .BANK_BITS(2)) dut (.*);
  always #5 clk = ~clk;

  logic [159:0] tree [2*NL];
  leaf_arg_t    args [NL];
  logic [159:0] seen [2*NL];
  int           n_nodes = 0;

  function automatic logic [159:0] h_arg(input leaf_arg_t a);
    bytes_t q; put(q, 256'(a.hdata), 20); put(q, 256'(a.vid), 4); put(q, 256'(a.hwkey), 20);
    return sha1(q);
  endfunction
  function automatic logic [159:0] h_node(input logic [159:0] l, input logic [159:0] r);
    bytes_t q; put(q, 256'(l), 20); put(q, 256'(r), 20);
    return sha1(q);
  endfunction
  function automatic void rebuild();
    for (int i = 0; i < NL; i++) tree[NL + i] = h_arg(args[i]);
    for (int i = NL - 1; i >= 1; i--) tree[i] = h_node(tree[2*i], tree[2*i+1]);
  endfunction
  function automatic leaf_arg_t rnd_arg();
    leaf_arg_t a;
    a.hdata = {$urandom, $urandom, $urandom, $urandom, $urandom};
    a.vid = $urandom;
    a.hwkey = {$urandom, $urandom, $urandom, $urandom, $urandom};
    return a;
  endfunction

  always @(negedge clk) if (node_valid) begin seen[node_idx] = node_hash; n_nodes++; end

  task automatic cmd(input logic [2:0] op, input int idx, input int bid, input logic [159:0] h,
                     input leaf_arg_t a, input logic exp_ok, input err_e exp_err);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_idx = (LB+1)'(idx); cmd_bid = 32'(bid); cmd_hash = h; cmd_arg = a;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk); cmd_valid = 0;
    while (!done) @(negedge clk);
    checks++;
    if (ok !== exp_ok || err !== exp_err) begin
      failures++; $display("FAIL op %0d idx %0d bid %0d: ok %0d err %0d, exp %0d %0d",
                           op, idx, bid, ok, err, exp_ok, exp_err);
    end
  endtask

  // Load and verify every node on the path of block b (siblings included).
  task automatic load_path(input int b);
    int n;
    for (int l = 1; l <= LB; l++) begin
      n = (NL + b) >> (LB - l);
      cmd(0, n & ~1, 0, tree[n & ~1], '0, 1, ERR_NONE);
      cmd(0, n | 1, 0, tree[n | 1], '0, 1, ERR_NONE);
      cmd(1, n >> 1, 0, 0, '0, 1, ERR_NONE);
    end
  endtask

  initial begin
    leaf_arg_t na, old;
    logic [159:0] old_leaf, old_root;
    for (int i = 0; i < NL; i++) args[i] = rnd_arg();
    rebuild();
    repeat (3) @(negedge clk);
    rst_n = 1;
    cmd(4, 0, 0, tree[1], '0, 1, ERR_NONE);                 // BOOT
    checks++; if (root !== tree[1]) failures++;
    cmd(2, 0, 5, 0, args[5], 0, ERR_TREE_MISS);             // nothing cached yet
    load_path(5);
    cmd(2, 0, 5, 0, args[5], 1, ERR_NONE);                  // certify read
    na = args[5]; na.vid++;
    cmd(2, 0, 5, 0, na, 0, ERR_LEAF);                       // stale / wrong arg
    cmd(0, 8, 0, ~tree[8], '0, 1, ERR_NONE);                // tampered node
    cmd(0, 9, 0, tree[9], '0, 1, ERR_NONE);
    cmd(1, 4, 0, 0, '0, 0, ERR_TREE_HASH);
    cmd(0, 1, 0, tree[1], '0, 0, ERR_CMD);                  // root cannot be loaded
    // UPDATE block 5
    old = args[5]; old_leaf = tree[NL + 5];
    na = rnd_arg();
    args[5] = na; rebuild();
    n_nodes = 0;
    cmd(3, 0, 5, 0, na, 1, ERR_NONE);
    checks++; if (n_nodes != LB + 1) begin failures++; $display("FAIL nodes %0d", n_nodes); end
    for (int l = 0; l <= LB; l++) begin
      int n; n = (NL + 5) >> (LB - l);
      checks++;
      if (seen[n] !== tree[n]) begin failures++; $display("FAIL node %0d", n); end
    end
    checks++; if (root !== tree[1]) begin failures++; $display("FAIL root after update"); end
    cmd(2, 0, 5, 0, na, 1, ERR_NONE);                       // new leaf certified
    cmd(2, 0, 5, 0, old, 0, ERR_LEAF);                      // old leaf refused
    // Replay of the old leaf: load it and try to verify it against its parent.
    cmd(0, NL + 5, 0, old_leaf, '0, 1, ERR_NONE);
    cmd(1, (NL + 5) >> 1, 0, 0, '0, 0, ERR_TREE_HASH);
    cmd(2, 0, 5, 0, old, 0, ERR_TREE_MISS);                 // leaf now unverified
    // UPDATE of a block whose path is not cached is refused and changes nothing.
    old_root = root;
    cmd(3, 0, 12, 0, rnd_arg(), 0, ERR_TREE_MISS);
    checks++; if (root !== old_root) begin failures++; $display("FAIL root changed"); end
    // A second update on another path after loading it.
    load_path(12);
    na = rnd_arg(); args[12] = na; rebuild();
    cmd(3, 0, 12, 0, na, 1, ERR_NONE);
    checks++; if (root !== tree[1]) begin failures++; $display("FAIL root after update 2"); end
    cmd(1, 0, 0, 0, '0, 0, ERR_CMD);                        // VERIFY of index 0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
