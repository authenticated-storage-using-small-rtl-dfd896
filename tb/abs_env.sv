// abs_env: client, server and S-chip model that drives the P chip through the
// storage protocol and checks every answer against values computed here.
//
// The server keeps a sparse model of the whole Merkle tree: every block that
// was never written has the same default leaf argument, so an untouched
// subtree of a given height has a known hash, and only written paths are
// stored. Clients compute their request HMACs and expected response HMACs
// with the reference HMAC-SHA1, and encrypt their write tokens with the
// reference AES. The S chip is modelled by the OP_STORE / OP_ACK commands:
// it supplies a nonce, checks HMAC_SK(MT_PS1||s||n) and acknowledges with
// HMAC_SK(MT_SP1||s||n).
//
// The scenario makes each mechanism happen and counts it: reboot refused,
// path LOAD/VERIFY, certified read, forged request, write accepted and held,
// read held behind a held write, read passed through, revision mismatch,
// unauthorized write key, stale leaf replay, root store, forged ack, release
// in order, buffer-full refusal. A mechanism that never happened is a
// failure. EXTRA_* lets the enclosing testbench add its own checks.
module abs_env
  import abs_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int LB         = 20,
  parameter int RESP_DEPTH = 102,
  parameter int WATCHDOG   = 3000000,
  parameter int WL_OPS     = 0,      // workload: writes and reads after the scenario
  parameter int WL_SET     = 2048    // workload: blocks in the working set
) (
  output logic               clk,
  output logic               rst_n,
  output logic [KEY_W-1:0]   sk,
  output logic               cmd_valid,
  input  logic               cmd_ready,
  output pchip_cmd_t         cmd,
  input  logic               cmd_done,
  input  err_e               cmd_err,
  input  logic               integrity_err,
  input  logic               resp_valid,
  output logic               resp_ready,
  input  resp_t              resp,
  input  logic               node_valid,
  input  logic [LB:0]        node_idx,
  input  logic [HASH_W-1:0]  node_hash,
  input  logic               root_out_valid,
  input  logic [HASH_W-1:0]  root_out,
  input  logic [HASH_W-1:0]  root_out_mac,
  input  logic               store_pending,
  input  logic [15:0]        held_count,
  input  logic               extra_done,
  input  int                 extra_checks,
  input  int                 extra_failures
);
  localparam logic [LB:0] NL = (LB+1)'(1) << LB;

  int checks = 0, failures = 0;
  logic clk_r = 0;
  assign clk = clk_r;
  always #5 clk_r = ~clk_r;

  // ---------------------------------------------------------------- tree model
  logic [159:0] zero_h [LB+1];        // hash of an untouched node at each level
  logic [159:0] nodes [logic [LB:0]]; // written nodes
  leaf_arg_t    args  [int];          // written leaf arguments
  leaf_arg_t    dflt;
  logic [95:0]  wkey0 = 96'h0123456789abcdef01234567;

  function automatic logic [159:0] h_arg(input leaf_arg_t a);
    bytes_t q; put(q, 256'(a.hdata), 20); put(q, 256'(a.vid), 4); put(q, 256'(a.hwkey), 20);
    return sha1(q);
  endfunction
  function automatic logic [159:0] h_node(input logic [159:0] l, input logic [159:0] r);
    bytes_t q; put(q, 256'(l), 20); put(q, 256'(r), 20);
    return sha1(q);
  endfunction
  function automatic logic [159:0] h_wkey(input logic [95:0] w);
    bytes_t q; put(q, 256'(w), 12);
    return sha1(q);
  endfunction
  function automatic int level(input logic [LB:0] i);
    int l = 0;
    for (int b = 0; b <= LB; b++) if (i[b]) l = b;
    return l;
  endfunction
  function automatic logic [159:0] node(input logic [LB:0] i);
    if (nodes.exists(i)) return nodes[i];
    return zero_h[level(i)];
  endfunction
  function automatic leaf_arg_t arg_of(input int b);
    if (args.exists(b)) return args[b];
    return dflt;
  endfunction
  function automatic void set_leaf(input int b, input leaf_arg_t a);
    logic [LB:0] i;
    args[b] = a;
    i = NL | (LB+1)'(b);
    nodes[i] = h_arg(a);
    while (i != 1) begin
      nodes[i >> 1] = i[0] ? h_node(node(i ^ 1), node(i)) : h_node(node(i), node(i ^ 1));
      i = i >> 1;
    end
  endfunction

  // ---------------------------------------------------------------- mechanism counters
  typedef enum int {
    EV_REBOOT_REFUSED, EV_VERIFY, EV_READ_OK, EV_FORGED_REQ, EV_WRITE_HELD, EV_READ_HELD,
    EV_READ_PASSED, EV_BAD_VID, EV_BAD_WKEY, EV_STALE_LEAF, EV_ROOT_STORE, EV_FORGED_ACK,
    EV_RELEASE, EV_BUF_FULL, EV_N
  } ev_e;
  int ev [EV_N];
  string ev_name [EV_N] = '{"reboot refused", "path verify", "read certified", "forged request",
    "write held", "read held", "read passed", "bad revision", "bad write key", "stale leaf",
    "root store", "forged ack", "release", "buffer full"};

  // ---------------------------------------------------------------- responses
  resp_t got [$];
  always @(posedge clk) if (resp_valid && resp_ready) got.push_back(resp);
  logic [159:0] seen [logic [LB:0]];
  always @(posedge clk) if (node_valid) seen[node_idx] = node_hash;
  logic [159:0] root_seen, root_mac_seen;
  always @(posedge clk) if (root_out_valid) begin root_seen = root_out; root_mac_seen = root_out_mac; end
  int n_integrity = 0;
  always @(posedge clk) if (integrity_err) n_integrity++;

  err_e last_err;
  task automatic issue(input pchip_cmd_t c, input err_e exp);
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 cmd_valid = 0;
    while (!cmd_done) @(negedge clk);
    last_err = cmd_err;
    checks++;
    if (cmd_err !== exp) begin
      failures++; $display("FAIL op %s bid %0d: err %s, expected %s", c.op.name(), c.bid,
                           cmd_err.name(), exp.name());
    end
  endtask

  function automatic pchip_cmd_t blank(input op_e op);
    pchip_cmd_t c = '0;
    c.op = op;
    return c;
  endfunction

  // The server makes the path of block b verified in the cache (LOAD + VERIFY).
  task automatic load_path(input int b);
    logic [LB:0] n;
    pchip_cmd_t c;
    for (int l = 1; l <= LB; l++) begin
      n = (NL | (LB+1)'(b)) >> (LB - l);
      c = blank(OP_LOAD); c.node_idx = 32'(n & ~(LB+1)'(1)); c.node_hash = node(n & ~(LB+1)'(1));
      issue(c, ERR_NONE);
      c = blank(OP_LOAD); c.node_idx = 32'(n | 1); c.node_hash = node(n | 1);
      issue(c, ERR_NONE);
      c = blank(OP_VERIFY); c.node_idx = 32'(n >> 1);
      issue(c, ERR_NONE);
      ev[EV_VERIFY]++;
    end
  endtask

  logic [127:0] skey [int];
  logic [63:0]  nonce = 64'h1000;

  function automatic logic [159:0] mac_req_r(input int sid, input int b, input logic [63:0] n);
    bytes_t q; put(q, 256'(MT_CP0), 1); put(q, 256'(b), 4); put(q, 256'(n), 8);
    return hmac(key_bytes(skey[sid]), q);
  endfunction
  function automatic bytes_t key_bytes(input logic [127:0] k);
    bytes_t q; put(q, 256'(k), 16); return q;
  endfunction

  // Read of block b by session sid; expect the response now (passed) or held.
  task automatic client_read(input int sid, input int b, input bit exp_held, input bit do_path);
    pchip_cmd_t c;
    bytes_t q;
    leaf_arg_t a;
    int n0;
    if (do_path) load_path(b);
    a = arg_of(b);
    nonce++;
    c = blank(OP_READ); c.sid = 8'(sid); c.bid = 32'(b); c.nonce = nonce; c.leaf_arg = a;
    c.hmac = mac_req_r(sid, b, nonce);
    n0 = got.size();
    issue(c, ERR_NONE);
    repeat (4) @(negedge clk);
    put(q, 256'(MT_PC0), 1); put(q, 256'(b), 4); put(q, 256'(nonce), 8);
    put(q, 256'(a.hdata), 20); put(q, 256'(a.vid), 4);
    exp_q.push_back(resp_t'{kind: RK_READ, sid: 8'(sid), bid: 32'(b), vid: a.vid,
                      hmac: hmac(key_bytes(skey[sid]), q)});
    ev[EV_READ_OK]++;
    checks++;
    if (exp_held) begin
      if (got.size() != n0) begin failures++; $display("FAIL read %0d not held", b); end
      else ev[EV_READ_HELD]++;
    end else begin
      if (got.size() != n0 + 1) begin failures++; $display("FAIL read %0d not passed", b); end
      else begin ev[EV_READ_PASSED]++; check_resp(got[$], exp_q[$]); void'(exp_q.pop_back()); end
    end
  endtask

  resp_t exp_q [$];      // expected responses still held (in order)

  task automatic check_resp(input resp_t g, input resp_t e);
    checks++;
    if (g !== e) begin
      failures++; $display("FAIL resp kind %s bid %0d vid %0d hmac %h, expected %s bid %0d vid %0d hmac %h",
                           g.kind.name(), g.bid, g.vid, g.hmac, e.kind.name(), e.bid, e.vid, e.hmac);
    end
  endtask

  // Write of block b by session sid with write key wk and revision vid_new,
  // new data hash hd and new write-key hash hwk*. exp selects the outcome.
  task automatic client_write(input int sid, input int b, input logic [95:0] wk,
                              input logic [31:0] vid_new, input logic [159:0] hd,
                              input err_e exp, input bit do_path);
    pchip_cmd_t c;
    bytes_t q;
    leaf_arg_t a, na;
    int n0;
    logic [159:0] hwk_new;
    if (do_path) load_path(b);
    a = arg_of(b);
    hwk_new = a.hwkey;                       // the writer keeps the same key
    nonce++;
    c = blank(OP_WRITE); c.sid = 8'(sid); c.bid = 32'(b); c.nonce = nonce; c.leaf_arg = a;
    c.hdata_new = hd; c.hwkey_new = hwk_new;
    c.token = aes_enc(skey[sid], {wk, vid_new});
    put(q, 256'(MT_CP1), 1); put(q, 256'(b), 4); put(q, 256'(nonce), 8);
    put(q, 256'(hd), 20); put(q, 256'(hwk_new), 20);
    c.hmac = hmac(key_bytes(skey[sid]), q);
    n0 = got.size();
    if (exp == ERR_NONE && vid_new == a.vid + 1) begin
      na = leaf_arg_t'{hdata: hd, vid: vid_new, hwkey: hwk_new};
      set_leaf(b, na);
    end
    issue(c, exp);
    repeat (4) @(negedge clk);
    q = {};
    if (exp != ERR_NONE) begin
      if (exp == ERR_WKEY) ev[EV_BAD_WKEY]++;
      if (exp == ERR_FULL) ev[EV_BUF_FULL]++;
      checks++;
      if (got.size() != n0) begin failures++; $display("FAIL refused write answered"); end
    end else if (vid_new != a.vid + 1) begin
      put(q, 256'(MT_PC2), 1); put(q, 256'(b), 4); put(q, 256'(nonce), 8); put(q, 256'(a.vid), 4);
      exp_q.push_back(resp_t'{kind: RK_BADVID, sid: 8'(sid), bid: 32'(b), vid: a.vid,
                        hmac: hmac(key_bytes(skey[sid]), q)});
      ev[EV_BAD_VID]++;
      checks++;
      if (got.size() != n0 + 1) begin failures++; $display("FAIL bad-vid answer missing"); end
      else begin check_resp(got[$], exp_q[$]); void'(exp_q.pop_back()); end
    end else begin
      put(q, 256'(MT_PC1), 1); put(q, 256'(b), 4); put(q, 256'(nonce), 8); put(q, 256'(hd), 20);
      exp_q.push_back(resp_t'{kind: RK_WRITE, sid: 8'(sid), bid: 32'(b), vid: vid_new,
                        hmac: hmac(key_bytes(skey[sid]), q)});
      checks++;
      if (got.size() != n0) begin failures++; $display("FAIL write %0d not held", b); end
      else ev[EV_WRITE_HELD]++;
      // every node of the path reported to the server
      for (int l = 0; l <= LB; l++) begin
        logic [LB:0] n;
        n = (NL | (LB+1)'(b)) >> (LB - l);
        checks++;
        if (!seen.exists(n) || seen[n] !== node(n)) begin
          failures++; $display("FAIL node %0d after write", n);
        end
      end
    end
  endtask

  // storeRoot: the S chip sends nonce n; check s and its HMAC.
  logic [159:0] s_sent;
  logic [63:0]  n_sent;
  task automatic store_root();
    pchip_cmd_t c;
    bytes_t q;
    n_sent = {$urandom, $urandom};
    c = blank(OP_STORE); c.nonce = n_sent;
    issue(c, ERR_NONE);
    @(negedge clk);
    put(q, 256'(MT_PS1), 1); put(q, 256'(node(1)), 20); put(q, 256'(n_sent), 8);
    checks++;
    if (root_seen !== node(1) || root_mac_seen !== hmac(key_bytes(sk), q)) begin
      failures++; $display("FAIL root store: s %h exp %h", root_seen, node(1));
    end else ev[EV_ROOT_STORE]++;
    s_sent = node(1);
  endtask

  // The S chip acknowledges; n_release responses must come out, in order.
  task automatic ack(input int n_release);
    pchip_cmd_t c;
    bytes_t q;
    int n0;
    put(q, 256'(MT_SP1), 1); put(q, 256'(s_sent), 20); put(q, 256'(n_sent), 8);
    n0 = got.size();
    c = blank(OP_ACK); c.hmac = hmac(key_bytes(sk), q) ^ 160'h1;   // forged by the server
    issue(c, ERR_ACK);
    repeat (3) @(negedge clk);
    checks++;
    if (got.size() != n0) failures++; else ev[EV_FORGED_ACK]++;
    c.hmac = hmac(key_bytes(sk), q);
    issue(c, ERR_NONE);
    repeat (RESP_DEPTH + 5) @(negedge clk);
    checks++;
    if (got.size() != n0 + n_release) begin
      failures++; $display("FAIL released %0d, expected %0d", got.size() - n0, n_release);
    end else begin
      for (int i = 0; i < n_release; i++) check_resp(got[n0 + i], exp_q[i]);
      for (int i = 0; i < n_release; i++) void'(exp_q.pop_front());
      if (n_release > 0) ev[EV_RELEASE]++;
    end
  endtask

  initial begin
    pchip_cmd_t c;
    bytes_t q;
    leaf_arg_t a;
    int b1, b2, b3, n_held;
    rst_n = 0; cmd_valid = 0; cmd = '0; resp_ready = 1;
    sk = {$urandom, $urandom, $urandom, $urandom};
    dflt = leaf_arg_t'{hdata: 160'h5ba93c9db0cff93f52b521d7420e43f6eda2784f, vid: 32'd0, hwkey: h_wkey(wkey0)};
    zero_h[LB] = h_arg(dflt);
    for (int l = LB - 1; l >= 0; l--) zero_h[l] = h_node(zero_h[l+1], zero_h[l+1]);
    foreach (ev[i]) ev[i] = 0;
    b1 = int'($urandom_range(0, int'(NL) - 1));
    b2 = b1 ^ 1;                        // sibling block, shares the path above
    b3 = int'(NL) - 1 - b1;             // far away
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    got = {};

    // sessions and boot
    skey[3] = {$urandom, $urandom, $urandom, $urandom};
    skey[7] = {$urandom, $urandom, $urandom, $urandom};
    c = blank(OP_SESSION); c.sid = 3; c.token = skey[3]; issue(c, ERR_NONE);
    c = blank(OP_SESSION); c.sid = 7; c.token = skey[7]; issue(c, ERR_NONE);
    c = blank(OP_STORE); c.nonce = 1; issue(c, ERR_CMD);             // no root yet
    c = blank(OP_BOOT); c.node_hash = node(1); issue(c, ERR_NONE);
    c = blank(OP_BOOT); c.node_hash = 0; issue(c, ERR_CMD);          // no second boot
    if (last_err == ERR_CMD) ev[EV_REBOOT_REFUSED]++;

    // read of an uncached block is refused, then certified after LOAD/VERIFY
    c = blank(OP_READ); c.sid = 3; c.bid = 32'(b1); c.leaf_arg = dflt; c.nonce = 5;
    c.hmac = mac_req_r(3, b1, 5);
    issue(c, ERR_TREE_MISS);
    client_read(3, b1, 0, 1);
    // forged request HMAC
    c.hmac = c.hmac ^ 160'h80;
    issue(c, ERR_REQ_HMAC);
    if (last_err == ERR_REQ_HMAC) ev[EV_FORGED_REQ]++;
    // unknown session
    c = blank(OP_READ); c.sid = 9; c.bid = 32'(b1);
    issue(c, ERR_SESSION);

    // write b1 by its owner: accepted, held
    client_write(3, b1, wkey0, 32'd1, {5{$urandom}}, ERR_NONE, 0);
    // another client reads b1: held behind the write; b2 passes
    client_read(7, b1, 1, 0);
    client_read(7, b2, 0, 0);
    // stale leaf replay on b1
    c = blank(OP_READ); c.sid = 7; c.bid = 32'(b1); c.leaf_arg = dflt; c.nonce = 77;
    c.hmac = mac_req_r(7, b1, 77);
    issue(c, ERR_LEAF);
    if (last_err == ERR_LEAF) ev[EV_STALE_LEAF]++;
    // replayed revision on b2: answered with the current Vid
    client_write(7, b2, wkey0, 32'd0, {5{$urandom}}, ERR_NONE, 0);
    // wrong write key on b2
    client_write(7, b2, ~wkey0, 32'd1, {5{$urandom}}, ERR_WKEY, 0);

    // root storage: seal, then a write after the seal stays held
    store_root();
    c = blank(OP_STORE); c.nonce = 3; issue(c, ERR_CMD);             // one store at a time
    client_write(3, b3, wkey0, 32'd1, {5{$urandom}}, ERR_NONE, 1);
    ack(2);                                                         // write b1, read b1
    store_root();
    ack(1);                                                         // write b3

    // fill the response buffer with writes, then one more is refused
    n_held = 0;
    for (int i = 0; i < RESP_DEPTH; i++) begin
      a = arg_of(b1);
      client_write(3, b1, wkey0, a.vid + 1, {5{$urandom}}, ERR_NONE, 0);
      n_held++;
    end
    checks++;
    if (held_count != 16'(RESP_DEPTH)) begin failures++; $display("FAIL held %0d", held_count); end
    client_write(3, b1, wkey0, arg_of(b1).vid + 1, {5{$urandom}}, ERR_FULL, 0);
    store_root();
    ack(n_held);
    client_read(3, b1, 0, 0);                                      // certified after all that

    // Workload in the style of the micro-benchmarks: WL_OPS writes, the first
    // half to random blocks of a WL_SET-block working set and the rest
    // sequential, with the root stored and acknowledged after every 8
    // writes; then WL_OPS reads, alternately random and sequential. The
    // server reloads and verifies each path before use.
    if (WL_OPS > 0) begin
      int wb;
      for (int i = 0; i < WL_OPS; i++) begin
        wb = (i < WL_OPS / 2) ? int'($urandom_range(0, WL_SET - 1)) : i - WL_OPS / 2;
        client_write(3 + 4 * (i % 2), wb, wkey0, arg_of(wb).vid + 1, {5{$urandom}}, ERR_NONE, 1);
        if (i % 8 == 7 || i == WL_OPS - 1) begin store_root(); ack(exp_q.size()); end
      end
      for (int i = 0; i < WL_OPS; i++) begin
        wb = (i % 2) ? int'($urandom_range(0, WL_SET - 1)) : i / 2;
        client_read(7, wb, 0, 1);
      end
      $display("workload: %0d writes and %0d reads on a %0d-block working set", WL_OPS, WL_OPS, WL_SET);
    end

    // integrity signal raised for each failed check on untrusted data
    checks++;
    if (n_integrity != 3 + ev[EV_FORGED_ACK]) begin failures++; $display("FAIL integrity pulses %0d", n_integrity); end

    while (!extra_done) @(negedge clk);
    for (int i = 0; i < EV_N; i++) begin
      $display("mechanism %-16s happened %0d times", ev_name[i], ev[i]);
      checks++;
      if (ev[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", ev_name[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  end
endmodule
