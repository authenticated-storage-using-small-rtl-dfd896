// tb_session_cache: opens random sessions, reads their keys back, closes
// some and checks that closed or never-opened sessions read as invalid.
module tb_session_cache;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_valid, rd_en = 0, rd_valid;
  logic [7:0] wr_sid, rd_sid;
  logic [127:0] wr_key, rd_key;
  logic [127:0] model [256];
  bit open [256];
  int checks = 0, failures = 0;

  session_cache dut (.*);
  always #5 clk = ~clk;

  task automatic wr(input int s, input bit v, input logic [127:0] k);
    @(negedge clk); wr_en = 1; wr_sid = 8'(s); wr_valid = v; wr_key = k;
    @(negedge clk); wr_en = 0;
    open[s] = v; if (v) model[s] = k;
  endtask
  task automatic rd(input int s);
    @(negedge clk); rd_en = 1; rd_sid = 8'(s);
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_valid !== open[s] || (open[s] && rd_key !== model[s])) begin
      failures++; $display("FAIL sid %0d valid %0d", s, rd_valid);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) wr($urandom_range(0, 255), 1, {$urandom, $urandom, $urandom, $urandom});
    for (int i = 0; i < 10; i++) wr($urandom_range(0, 255), 0, 0);
    for (int i = 0; i < 256; i++) rd(i);
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
