// aes128_dec: AES-128 decryption engine (FIPS-197 inverse cipher).
//
// In the storage protocol a writer sends its write key and the next revision
// number encrypted under the session key, {Wkey || Vid+1}_Skey; the P chip
// decrypts this 128-bit token before it lets the write change the Merkle
// tree. The session key changes from request to request, so the engine
// expands the key on every start: ten cycles of forward key expansion into a
// register file of eleven round keys, then one inverse round per cycle (ten
// cycles). The S-box inverse is computed from its definition (the inverse in
// GF(2^8) as x^254 after the inverse affine map) instead of a stored table.
//
// Interface: start (one cycle, while !busy) captures key and ct; done pulses
// with pt 21 cycles later; busy is high in between. The iterative
// one-round-per-cycle organisation is this design's choice; the document
// names an AES engine without describing it.
module aes128_dec (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] ct,
  output logic         busy,
  output logic         done,
  output logic [127:0] pt
);
  typedef enum logic [1:0] { S_IDLE, S_KEXP, S_ROUND } state_e;

  state_e        st_q;
  logic [127:0]  rk_q [11];
  logic [127:0]  ct_q, state_q;
  logic [3:0]    cnt_q;
  logic [7:0]    rc_q;

  function automatic logic [7:0] xt(input logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, aa;
    r = '0; aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r = r ^ aa;
      aa = xt(aa);
    end
    return r;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] x);   // x^254, 0 -> 0
    logic [7:0] r, p;
    r = 8'h01; p = x;
    for (int i = 1; i < 8; i++) begin
      p = gmul(p, p);
      r = gmul(r, p);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] b;
    b = ginv(x);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] y);
    return ginv(rotl8(y, 1) ^ rotl8(y, 3) ^ rotl8(y, 6) ^ 8'h05);
  endfunction

  // Next round key of the forward expansion.
  function automatic logic [127:0] next_rk(input logic [127:0] k, input logic [7:0] rc);
    logic [31:0] t, w0, w1, w2, w3;
    t  = {sbox(k[23:16]) ^ rc, sbox(k[15:8]), sbox(k[7:0]), sbox(k[31:24])};
    w0 = k[127:96] ^ t;
    w1 = k[95:64]  ^ w0;
    w2 = k[63:32]  ^ w1;
    w3 = k[31:0]   ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // One inverse round: InvShiftRows, InvSubBytes, AddRoundKey, and
  // InvMixColumns unless it is the last round. Byte i of the state is bits
  // [127-8i -: 8]; byte 4c+r is row r of column c.
  function automatic logic [127:0] inv_round(input logic [127:0] s, input logic [127:0] k,
                                             input logic last);
    logic [7:0]   b [16];
    logic [7:0]   c [16];
    logic [127:0] o;
    for (int cc = 0; cc < 4; cc++)
      for (int rr = 0; rr < 4; rr++)
        b[4*((cc + rr) % 4) + rr] = inv_sbox(s[127 - 8*(4*cc + rr) -: 8]);
    for (int i = 0; i < 16; i++) c[i] = b[i] ^ k[127 - 8*i -: 8];
    if (!last)
      for (int cc = 0; cc < 4; cc++) begin
        logic [7:0] a0, a1, a2, a3;
        a0 = c[4*cc]; a1 = c[4*cc+1]; a2 = c[4*cc+2]; a3 = c[4*cc+3];
        c[4*cc]   = gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09);
        c[4*cc+1] = gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d);
        c[4*cc+2] = gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b);
        c[4*cc+3] = gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e);
      end
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = c[i];
    return o;
  endfunction

  logic [127:0] rk_cur;
  assign rk_cur = rk_q[cnt_q];
  assign busy   = (st_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; cnt_q <= '0; rc_q <= 8'h01;
      ct_q <= '0; state_q <= '0; done <= 1'b0; pt <= '0;
      for (int i = 0; i < 11; i++) rk_q[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          rk_q[0] <= key; ct_q <= ct; cnt_q <= 4'd1; rc_q <= 8'h01;
          st_q <= S_KEXP;
        end
        S_KEXP: begin
          rk_q[cnt_q] <= next_rk(rk_q[cnt_q - 1'b1], rc_q);
          rc_q        <= xt(rc_q);
          if (cnt_q == 4'd10) begin
            state_q <= ct_q ^ next_rk(rk_q[9], rc_q);
            cnt_q   <= 4'd9;
            st_q    <= S_ROUND;
          end else cnt_q <= cnt_q + 1'b1;
        end
        S_ROUND: begin
          state_q <= inv_round(state_q, rk_cur, cnt_q == 4'd0);
          if (cnt_q == 4'd0) begin
            pt   <= inv_round(state_q, rk_cur, 1'b1);
            done <= 1'b1;
            st_q <= S_IDLE;
          end else cnt_q <= cnt_q - 1'b1;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
