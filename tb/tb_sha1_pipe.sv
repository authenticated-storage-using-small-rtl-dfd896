// tb_sha1_pipe: checks the pipelined SHA-1 compression against a reference
// model. Sends the padded block of "abc" (known digest), then bursts of
// random blocks back to back so that all four stages are busy, and checks
// every result, its tag, and the 80-cycle latency and one-block-per-20-cycle
// acceptance rate.
module tb_sha1_pipe;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  logic [159:0] in_cv, out_cv;
  logic [511:0] in_block;
  logic [3:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  longint cyc = 0;

  sha1_pipe #(.STAGES(4), .TAG_W(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [159:0] exp_cv [16];
  longint t_in [16];
  int n_out = 0;

  // Outputs are sampled at the falling edge, after the rising edge that set them.
  always @(negedge clk) if (out_valid) begin
    checks++;
    if (out_cv !== exp_cv[out_tag]) begin
      failures++; $display("FAIL tag %0d got %h exp %h", out_tag, out_cv, exp_cv[out_tag]);
    end
    checks++;
    if (cyc - t_in[out_tag] - 1 != 80) begin
      failures++; $display("FAIL latency %0d", cyc - t_in[out_tag] - 1);
    end
    n_out++;
  end

  task automatic send(input logic [159:0] cv, input logic [511:0] blk, input logic [3:0] tag);
    @(negedge clk);
    in_valid = 1; in_cv = cv; in_block = blk; in_tag = tag;
    exp_cv[tag] = sha1_block(cv, blk);
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    t_in[tag] = cyc;
    #1 in_valid = 0;
  endtask

  initial begin
    bytes_t abc;
    logic [511:0] b;
    longint t0;
    abc = '{8'h61, 8'h62, 8'h63};
    repeat (3) @(posedge clk);
    rst_n = 1;
    b = '0; b[511:488] = 24'h616263; b[487:480] = 8'h80; b[63:0] = 64'd24;
    send(160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0, b, 0);
    checks++;
    if (exp_cv[0] !== 160'ha9993e364706816aba3e25717850c26c9cd0d89d || sha1(abc) !== exp_cv[0]) begin
      failures++; $display("FAIL reference model");
    end
    repeat (100) @(posedge clk);
    for (int burst = 0; burst < 3; burst++) begin
      t0 = cyc;
      for (int i = 0; i < 5; i++)
        send({$urandom, $urandom, $urandom, $urandom, $urandom},
             {16{$urandom}} ^ {$urandom, 480'(0)}, 4'(burst*5 + i + 1));
      checks++;
      if (t_in[burst*5+5] - t_in[burst*5+1] != 80) begin
        failures++; $display("FAIL rate");
      end
    end
    repeat (120) @(posedge clk);
    checks++;
    if (n_out != 16) begin failures++; $display("FAIL count %0d", n_out); end
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
