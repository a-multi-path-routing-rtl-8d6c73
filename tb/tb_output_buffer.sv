// tb_output_buffer: pushes numbered flits while a receiver model returns
// credits at random. Checks the link order, that the buffer never sends
// without a credit (at most CREDITS flits outstanding), that it stops when no
// credit comes back, and that `full` is raised at DEPTH entries.
module tb_output_buffer;
  import noc_pkg::*;

  localparam int DEPTH = 4, CREDITS = 2;
  logic clk = 0, rst_n = 0;
  logic in_push, full, link_valid, credit_in;
  flit_t in_flit, link_flit;
  int checks = 0, failures = 0;
  int pushed, recv, outstanding;

  output_buffer #(.DEPTH(DEPTH), .CREDITS(CREDITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: counts outstanding flits, returns credits later
  always @(posedge clk) if (rst_n) begin
    if (link_valid) begin
      checks++;
      if (link_flit.data !== 64'(recv)) begin failures++; $display("FAIL order %0d exp %0d", link_flit.data, recv); end
      recv++;
    end
    outstanding <= outstanding + (link_valid ? 1 : 0) - (credit_in ? 1 : 0);
  end

  initial begin
    in_push = 0; in_flit = '0; credit_in = 0; pushed = 0; recv = 0; outstanding = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: no credits returned -> exactly CREDITS flits leave, then full
    for (int i = 0; i < DEPTH + CREDITS; i++) begin
      @(negedge clk);
      in_push = 1; in_flit = '0; in_flit.data = 64'(pushed);
      @(posedge clk); pushed++;
    end
    @(negedge clk); in_push = 0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    checks++; if (recv != CREDITS) begin failures++; $display("FAIL sent %0d without credits", recv); end
    checks++; if (full !== 1'b1) begin failures++; $display("FAIL not full"); end
    // phase 2: random traffic with random credit return
    while (recv < 400) begin
      @(negedge clk);
      in_push = !full && pushed < 400 && ($urandom_range(3) != 0);
      in_flit = '0; in_flit.data = 64'(pushed);
      credit_in = (outstanding > 0) && ($urandom_range(1) == 1);
      checks++;
      if (outstanding > CREDITS) begin failures++; $display("FAIL %0d outstanding", outstanding); end
      @(posedge clk);
      if (in_push) pushed++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
