// tb_input_buffer: a credit-counting sender pushes numbered flits into the
// buffer while a random reader pops them; checks order, the valid flag and
// that every pop returns exactly one credit in the same cycle.
module tb_input_buffer;
  import noc_pkg::*;

  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid, credit_out, out_valid, out_pop;
  flit_t in_flit, out_flit;
  int checks = 0, failures = 0;
  int credits, sent, recv, credits_back;

  input_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0; out_pop = 0;
    credits = DEPTH; sent = 0; recv = 0; credits_back = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++; if (out_valid !== 1'b0) begin failures++; $display("FAIL not empty after reset"); end
    while (recv < 500) begin
      @(negedge clk);
      // sender side
      in_valid = (credits > 0) && ($urandom_range(3) != 0) && sent < 500;
      in_flit  = '0;
      in_flit.data = 64'(sent);
      in_flit.head = sent[0];
      // receiver side
      out_pop = out_valid && ($urandom_range(2) != 0);
      if (out_pop) begin
        checks++;
        if (out_flit.data !== 64'(recv) || out_flit.head !== recv[0]) begin
          failures++; $display("FAIL order got %0d exp %0d", out_flit.data, recv);
        end
        recv++;
      end
      #1;
      checks++;
      if (credit_out !== out_pop) begin failures++; $display("FAIL credit_out=%b pop=%b", credit_out, out_pop); end
      @(posedge clk);
      if (in_valid) begin credits--; sent++; end
      if (credit_out) begin credits++; credits_back++; end
    end
    @(negedge clk); in_valid = 0; out_pop = 0;
    checks++;
    if (credits != DEPTH || credits_back != 500) begin failures++; $display("FAIL credits %0d back %0d", credits, credits_back); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
