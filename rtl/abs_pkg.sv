// abs_pkg: widths, message-type codes and command/response records shared by
// the P-chip blocks of the authenticated block storage (ABS) design.
//
// Field widths follow the protocol of the design: SHA-1 digests are 160 bits,
// a session key (HMAC key and AES key at once) is 128 bits, and the encrypted
// write-access token {Wkey||Vid}_Skey is a single 128-bit AES block made of a
// 96-bit write key and a 32-bit revision number. Block IDs are 32 bits and
// nonces 64 bits. These widths and the one-byte message-type codes are this
// design's choices; the protocol itself only names the fields.
package abs_pkg;

  localparam int unsigned HASH_W  = 160;  // SHA-1 digest
  localparam int unsigned KEY_W   = 128;  // Skey / SK
  localparam int unsigned WKEY_W  = 96;   // write key
  localparam int unsigned VID_W   = 32;   // revision number
  localparam int unsigned BID_W   = 32;   // block ID
  localparam int unsigned NONCE_W = 64;   // client / S-chip nonce
  localparam int unsigned SID_W   = 8;    // session ID
  localparam int unsigned MT_W    = 8;    // message type

  // A short message: at most 55 bytes, so that it fits one SHA-1 block
  // together with its padding. Bytes are left aligned (byte 0 in [439:432]).
  localparam int unsigned MSG_W   = 440;
  localparam int unsigned LEN_W   = 6;

  // leaf_arg = H(data) || Vid || H(Wkey)  (44 bytes)
  localparam int unsigned LEAFARG_W = HASH_W + VID_W + HASH_W;

  // Message types MT_XYN: from X to Y, sub-type N (C client, P P chip, S S chip).
  typedef enum logic [MT_W-1:0] {
    MT_CP0 = 8'h10,  // read request            Bid||n
    MT_CP1 = 8'h11,  // write request           Bid||n||H(data)||H(Wkey*)
    MT_PC0 = 8'h20,  // read response           Bid||n||H(data)||Vid
    MT_PC1 = 8'h21,  // write accepted          Bid||n||H(data)
    MT_PC2 = 8'h22,  // write refused, bad Vid  Bid||n||Vid
    MT_PS1 = 8'h31,  // root hash to S chip     s||n
    MT_SP1 = 8'h41   // S chip acknowledgment   s||n
  } mt_e;

  typedef struct packed {
    logic [HASH_W-1:0] hdata;
    logic [VID_W-1:0]  vid;
    logic [HASH_W-1:0] hwkey;
  } leaf_arg_t;

  // ---------------------------------------------------------------- server commands
  typedef enum logic [3:0] {
    OP_LOAD     = 4'd0,  // load a tree node into the tree cache
    OP_VERIFY   = 4'd1,  // verify two cached children against their parent
    OP_READ     = 4'd2,  // certifyRead: authenticate a read response
    OP_WRITE    = 4'd3,  // update: write access control and tree update
    OP_STORE    = 4'd4,  // storeRoot: nonce from the S chip, send root hash
    OP_ACK      = 4'd5,  // S-chip acknowledgment of the stored root hash
    OP_SESSION  = 4'd6,  // load the key of a new session
    OP_BOOT     = 4'd7   // load the root hash restored from the S chip
  } op_e;

  typedef struct packed {
    op_e                op;
    logic [SID_W-1:0]   sid;
    logic [BID_W-1:0]   bid;
    logic [NONCE_W-1:0] nonce;      // client nonce, or the S chip's nonce (OP_STORE)
    logic [HASH_W-1:0]  hmac;       // HMAC(req), or the S chip's acknowledgment (OP_ACK)
    leaf_arg_t          leaf_arg;   // current leaf argument supplied by the server
    logic [HASH_W-1:0]  hdata_new;  // H(data*) of a write
    logic [HASH_W-1:0]  hwkey_new;  // H(Wkey*) of a write
    logic [KEY_W-1:0]   token;      // {Wkey||Vid+1}_Skey, or a session key (OP_SESSION)
    logic [31:0]        node_idx;   // tree index (OP_LOAD, OP_VERIFY parent)
    logic [HASH_W-1:0]  node_hash;  // node value (OP_LOAD) or root (OP_BOOT)
  } pchip_cmd_t;

  // ---------------------------------------------------------------- responses
  typedef enum logic [1:0] {
    RK_READ   = 2'd0,  // HMAC(respR)
    RK_WRITE  = 2'd1,  // HMAC(respW1)
    RK_BADVID = 2'd2   // Vid*, HMAC(respW2)
  } resp_kind_e;

  typedef struct packed {
    resp_kind_e         kind;
    logic [SID_W-1:0]   sid;
    logic [BID_W-1:0]   bid;
    logic [VID_W-1:0]   vid;
    logic [HASH_W-1:0]  hmac;
  } resp_t;

  // Error codes of the integrity check signal.
  typedef enum logic [3:0] {
    ERR_NONE     = 4'd0,
    ERR_TREE_MISS= 4'd1,  // a node the command needs is not in the cache
    ERR_TREE_HASH= 4'd2,  // hash mismatch while verifying tree nodes
    ERR_LEAF     = 4'd3,  // leaf_arg does not hash to the verified leaf
    ERR_REQ_HMAC = 4'd4,  // client request HMAC wrong
    ERR_WKEY     = 4'd5,  // write key does not match H(Wkey)
    ERR_ACK      = 4'd6,  // S-chip acknowledgment wrong
    ERR_SESSION  = 4'd7,  // unknown session
    ERR_CMD      = 4'd8,  // malformed or out-of-order command (e.g. LOAD of the root)
    ERR_FULL     = 4'd9   // response buffer full: read/write refused, retry after an ack
  } err_e;

  // Errors that mean a check on untrusted data failed (integrity check signal);
  // the others only refuse a malformed or premature command.
  function automatic logic is_integrity(input err_e e);
    return e inside {ERR_TREE_HASH, ERR_LEAF, ERR_REQ_HMAC, ERR_WKEY, ERR_ACK};
  endfunction

  // SHA-1 initial chaining value.
  localparam logic [HASH_W-1:0] SHA1_IV =
      160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  // Pad a message of len (<= 55) bytes, left aligned in msg, into one SHA-1
  // block; total_bytes is the length counted in the padding (it is larger
  // than len when this block follows earlier blocks, as in HMAC).
  function automatic logic [511:0] sha1_pad(input logic [MSG_W-1:0] msg,
                                            input logic [LEN_W-1:0] len,
                                            input logic [63:0] total_bytes);
    logic [511:0] b;
    b = '0;
    for (int i = 0; i < 56; i++) begin
      if (i < 55 && i < int'(len)) b[511-8*i -: 8] = msg[MSG_W-1-8*(i%55) -: 8];
      else if (i == int'(len)) b[511-8*i -: 8] = 8'h80;
    end
    b[63:0] = total_bytes << 3;
    return b;
  endfunction

endpackage
