// tb_path_selector: draws many paths and checks the shares against the
// programmed probabilities (within a tolerance), that a disabled path is never
// chosen and its share moves to the next enabled path, and that path_ok drops
// when no path is enabled.
module tb_path_selector;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [8:0] thr [4];
  logic [3:0] path_en;
  logic advance;
  logic [1:0] path;
  logic path_ok;
  int checks = 0, failures = 0;
  int cnt [4];

  path_selector #(.N_PATHS(4), .PW(8), .SEED(16'h1234)) dut (.*);

  always #5 clk = ~clk;

  task automatic draw(int n);
    for (int k = 0; k < 4; k++) cnt[k] = 0;
    repeat (n) begin
      @(negedge clk);
      advance = 1;
      cnt[path]++;
      checks++;
      if (!path_ok || !path_en[path]) begin failures++; $display("FAIL disabled path %0d", path); end
      @(posedge clk);
    end
    @(negedge clk); advance = 0;
  endtask

  task automatic near(int got, int exp, int tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++; $display("FAIL share %0d expected %0d", got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    advance = 0;
    // 12.5 %, 37.5 %, 50 %, 0 %
    thr[0] = 32; thr[1] = 128; thr[2] = 256; thr[3] = 256; path_en = 4'b0111;
    repeat (2) @(posedge clk);
    rst_n = 1;
    draw(4096);
    near(cnt[0], 512, 120); near(cnt[1], 1536, 160); near(cnt[2], 2048, 160); near(cnt[3], 0, 0);
    // path 1 failed: its share goes to path 2
    path_en = 4'b0101;
    draw(4096);
    near(cnt[0], 512, 120); near(cnt[1], 0, 0); near(cnt[2], 3584, 120);
    // single path
    thr[0] = 256; path_en = 4'b0001;
    draw(200);
    near(cnt[0], 200, 0);
    // nothing enabled
    path_en = 4'b0000;
    #1; checks++; if (path_ok) begin failures++; $display("FAIL path_ok with no path"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
