// tb_aes128_dec: decrypts the FIPS-197 appendix C.1 vector, then random
// tokens encrypted by the reference AES encryption of the testbench package,
// and checks the recovered plaintext and the 21-cycle latency.
module tb_aes128_dec;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] key, ct, pt;
  int checks = 0, failures = 0;

  aes128_dec dut (.*);
  always #5 clk = ~clk;

  task automatic run(input logic [127:0] k, input logic [127:0] c, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; ct = c; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (pt !== exp) begin failures++; $display("FAIL got %h exp %h", pt, exp); end
    checks++;
    if (cyc != 21) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    logic [127:0] k, p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (aes_enc(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("FAIL reference encrypt");
    end
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff);
    for (int t = 0; t < 8; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, aes_enc(k, p), p);
    end
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
