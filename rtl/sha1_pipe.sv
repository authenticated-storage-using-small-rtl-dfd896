// sha1_pipe: SHA-1 compression function as a STAGES-deep pipeline.
//
// The 80 rounds of one 512-bit block are split evenly over STAGES stages
// (20 rounds each for the 4-stage default). Each stage does one round per
// clock, so a stage holds its block for 80/STAGES cycles; all stages advance
// in lock step, driven by one shared round counter. Up to STAGES independent
// blocks (for instance the blocks of different messages, or different nodes
// of a Merkle tree) are in flight at once, giving one compression every
// 80/STAGES cycles. Each stage carries its own 16-word message-schedule
// window, so no schedule memory is shared between stages.
//
// Interface: a block is taken (chaining value in_cv, block in_block, tag
// in_tag) in a cycle where in_valid and in_ready are both high; in_ready is
// high one cycle in every 80/STAGES. 80 + 80/STAGES cycles later out_valid
// pulses for one cycle with the new chaining value out_cv (the Davies-Meyer
// sum cv + state) and the same tag. No back-pressure on the output.
//
// The four-stage depth follows the FPGA prototype's hash engine; the lock-step
// organisation and the tag are this design's choices.
module sha1_pipe #(
  parameter int unsigned STAGES = 4,
  parameter int unsigned TAG_W  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [159:0]       in_cv,
  input  logic [511:0]       in_block,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output logic [159:0]       out_cv,
  output logic [TAG_W-1:0]   out_tag
);
  localparam int unsigned RPS = 80 / STAGES;   // rounds per stage
  localparam int unsigned CW  = $clog2(RPS + 1);

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [159:0]      cv;
    logic [31:0]       a, b, c, d, e;
    logic [15:0][31:0] w;     // w[0] is the word used by the current round
  } stage_t;

  stage_t          st_q [STAGES];
  stage_t          st_n [STAGES];   // state after this cycle's round
  logic [CW-1:0]   rnd_q;
  logic            shift;

  assign shift    = (rnd_q == CW'(RPS - 1));
  assign in_ready = shift;

  function automatic logic [31:0] rotl(input logic [31:0] x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // One SHA-1 round of round number t on stage s.
  function automatic stage_t do_round(input stage_t s, input int unsigned t);
    stage_t      r;
    logic [31:0] f, k, tmp, wn;
    r = s;
    if (t < 20) begin
      f = (s.b & s.c) | (~s.b & s.d);          k = 32'h5A827999;
    end else if (t < 40) begin
      f = s.b ^ s.c ^ s.d;                      k = 32'h6ED9EBA1;
    end else if (t < 60) begin
      f = (s.b & s.c) | (s.b & s.d) | (s.c & s.d); k = 32'h8F1BBCDC;
    end else begin
      f = s.b ^ s.c ^ s.d;                      k = 32'hCA62C1D6;
    end
    tmp = rotl(s.a, 5) + f + s.e + k + s.w[15];
    r.e = s.d;
    r.d = s.c;
    r.c = rotl(s.b, 30);
    r.b = s.a;
    r.a = tmp;
    // Next schedule word W[t+16] = rotl1(W[t+13] ^ W[t+8] ^ W[t+2] ^ W[t]).
    wn  = rotl(s.w[2] ^ s.w[7] ^ s.w[13] ^ s.w[15], 1);
    r.w = {s.w[14:0], wn};
    return r;
  endfunction

  // w is held with the current word in w[15] (the most significant word),
  // so that a 512-bit block loads without reordering.
  always_comb begin
    for (int s = 0; s < STAGES; s++)
      st_n[s] = do_round(st_q[s], s * RPS + int'(rnd_q));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd_q     <= '0;
      out_valid <= 1'b0;
      out_cv    <= '0;
      out_tag   <= '0;
      for (int s = 0; s < STAGES; s++) st_q[s] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (shift) begin
        rnd_q <= '0;
        // Last stage finishes: add the chaining value.
        if (st_q[STAGES-1].valid) begin
          out_valid <= 1'b1;
          out_tag   <= st_q[STAGES-1].tag;
          out_cv    <= { st_q[STAGES-1].cv[159:128] + st_n[STAGES-1].a,
                         st_q[STAGES-1].cv[127:96]  + st_n[STAGES-1].b,
                         st_q[STAGES-1].cv[95:64]   + st_n[STAGES-1].c,
                         st_q[STAGES-1].cv[63:32]   + st_n[STAGES-1].d,
                         st_q[STAGES-1].cv[31:0]    + st_n[STAGES-1].e };
        end
        for (int s = STAGES - 1; s > 0; s--) st_q[s] <= st_n[s-1];
        st_q[0].valid <= in_valid;
        st_q[0].tag   <= in_tag;
        st_q[0].cv    <= in_cv;
        st_q[0].a     <= in_cv[159:128];
        st_q[0].b     <= in_cv[127:96];
        st_q[0].c     <= in_cv[95:64];
        st_q[0].d     <= in_cv[63:32];
        st_q[0].e     <= in_cv[31:0];
        st_q[0].w     <= in_block;
      end else begin
        rnd_q <= rnd_q + 1'b1;
        for (int s = 0; s < STAGES; s++) st_q[s] <= st_n[s];
      end
    end
  end

  initial begin
    assert (80 % STAGES == 0) else $error("sha1_pipe: STAGES must divide 80");
  end
endmodule
