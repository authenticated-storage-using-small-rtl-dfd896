// tb_tree_cache: writes nodes at every tree level and reads them back,
// checking hit, verified flag and hash against a model; checks that two
// nodes of one level with equal low index bits evict each other, that a
// parent, its children and a whole leaf-to-root path never share a slot,
// and that the root output follows writes to node 1.
module tb_tree_cache;
  localparam int LB = 20;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, rd_hit, rd_verified, wr_en = 0, wr_verified, root_valid;
  logic [LB:0] rd_idx, wr_idx;
  logic [159:0] rd_hash, wr_hash, root;
  int checks = 0, failures = 0;

  tree_cache #(.LEAF_BITS(LB), .CACHE_BITS(14), .BANK_BITS(10)) dut (.*);
  always #5 clk = ~clk;

  task automatic wr(input logic [LB:0] i, input logic [159:0] h, input logic v);
    @(negedge clk); wr_en = 1; wr_idx = i; wr_hash = h; wr_verified = v;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(input logic [LB:0] i, input logic hit, input logic v, input logic [159:0] h);
    @(negedge clk); rd_en = 1; rd_idx = i;
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_hit !== hit || (hit && (rd_verified !== v || rd_hash !== h))) begin
      failures++; $display("FAIL idx %0d hit %0d/%0d ver %0d/%0d", i, rd_hit, hit, rd_verified, v);
    end
  endtask

  initial begin
    logic [LB:0] path [LB+1];
    logic [159:0] hv [LB+1];
    logic [LB:0] leaf;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(1, 0, 0, 0);                       // empty after reset
    checks++; if (root_valid !== 0) failures++;
    // A whole path plus siblings, alternating verified flags.
    leaf = (1 << LB) | LB'($urandom);
    for (int l = 0; l <= LB; l++) begin
      path[l] = leaf >> (LB - l);
      hv[l] = {$urandom, $urandom, $urandom, $urandom, $urandom};
      wr(path[l], hv[l], l[0]);
      if (l > 0) wr(path[l] ^ 1, ~hv[l], 1);
    end
    for (int l = 0; l <= LB; l++) begin
      rd(path[l], 1, l[0], hv[l]);
      if (l > 0) rd(path[l] ^ 1, 1, 1, ~hv[l]);
    end
    checks++; if (root !== hv[0] || root_valid !== 1) begin failures++; $display("FAIL root"); end
    // Same level, same low 10 bits: evicts.
    wr((1 << LB) | 21'h00123, 160'h1, 1);
    wr((1 << LB) | 21'h40123, 160'h2, 0);
    rd((1 << LB) | 21'h00123, 0, 0, 0);
    rd((1 << LB) | 21'h40123, 1, 0, 160'h2);
    // Different levels with equal low bits do not collide.
    wr(21'h00523, 160'h3, 1);             // level 10
    wr(21'h00923, 160'h4, 1);             // level 11
    rd(21'h00523, 1, 1, 160'h3);
    rd(21'h00923, 1, 1, 160'h4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
