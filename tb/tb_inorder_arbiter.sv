// tb_inorder_arbiter: directed scenarios for the switch arbiter with 3 inputs
// and 3 outputs:
//   1. an out-of-order head is never granted and is reported as stalled,
//      while an in-order head on another input gets the output;
//   2. a multi-flit packet locks its output until the tail, and other heads
//      for that output wait;
//   3. two in-order heads for one output are served round-robin;
//   4. a full output buffer blocks both heads and body flits;
//   5. a granted head raises lut_inc for its input.
module tb_inorder_arbiter;
  import noc_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic req_valid [N], req_head [N], req_tail [N], in_order [N], out_full [N];
  logic [PORT_W-1:0] req_port [N];
  logic pop [N], lut_inc [N], sel_valid [N], stalled [N];
  logic [1:0] sel [N];
  int checks = 0, failures = 0;

  inorder_arbiter #(.N_IN(N), .N_OUT(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect1(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle();
    for (int i = 0; i < N; i++) begin
      req_valid[i] = 0; req_head[i] = 0; req_tail[i] = 0; req_port[i] = 0; in_order[i] = 1;
      out_full[i] = 0;
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. input 0 out of order, input 1 in order, both to output 2 (single-flit packets)
    @(negedge clk);
    req_valid[0] = 1; req_head[0] = 1; req_tail[0] = 1; req_port[0] = 2; in_order[0] = 0;
    req_valid[1] = 1; req_head[1] = 1; req_tail[1] = 1; req_port[1] = 2; in_order[1] = 1;
    #1;
    expect1("ooo not popped", pop[0] == 0);
    expect1("ooo stalled", stalled[0] == 1);
    expect1("in-order popped", pop[1] == 1 && sel_valid[2] && sel[2] == 1);
    expect1("lut_inc on grant", lut_inc[1] == 1 && lut_inc[0] == 0);
    @(posedge clk); @(negedge clk);
    req_valid[1] = 0;
    #1;
    expect1("ooo still held", pop[0] == 0 && !sel_valid[2]);
    // it becomes in order
    in_order[0] = 1;
    #1;
    expect1("now granted", pop[0] == 1 && sel_valid[2] && sel[2] == 0);
    @(posedge clk); @(negedge clk);
    idle();
    // 2. input 2 sends a 3-flit packet to output 0; input 1 head for output 0 waits
    req_valid[2] = 1; req_head[2] = 1; req_port[2] = 0;
    #1; expect1("head granted", pop[2] && sel_valid[0] && sel[0] == 2);
    @(posedge clk); @(negedge clk);
    req_head[2] = 0; req_port[2] = 7;       // body flit, port bits meaningless
    req_valid[1] = 1; req_head[1] = 1; req_tail[1] = 1; req_port[1] = 0;
    #1;
    expect1("body follows lock", pop[2] && sel[0] == 2);
    expect1("other head waits", !pop[1]);
    expect1("no inc for body", !lut_inc[2]);
    @(posedge clk); @(negedge clk);
    req_valid[2] = 0;
    #1; expect1("lock holds with no flit", !sel_valid[0] && !pop[1]);
    @(posedge clk); @(negedge clk);
    req_valid[2] = 1; req_tail[2] = 1;
    #1; expect1("tail passes", pop[2] && sel[0] == 2 && !pop[1]);
    @(posedge clk); @(negedge clk);
    req_valid[2] = 0;
    #1; expect1("released", pop[1] && sel[0] == 1);
    @(posedge clk); @(negedge clk);
    idle();
    // 3. round robin between inputs 0 and 1 for output 1, single-flit packets
    begin
      int n0, n1;
      n0 = 0; n1 = 0;
      for (int k = 0; k < 10; k++) begin
        req_valid[0] = 1; req_head[0] = 1; req_tail[0] = 1; req_port[0] = 1;
        req_valid[1] = 1; req_head[1] = 1; req_tail[1] = 1; req_port[1] = 1;
        #1;
        expect1("one winner", pop[0] != pop[1]);
        if (pop[0]) n0++;
        if (pop[1]) n1++;
        @(posedge clk); @(negedge clk);
      end
      expect1("fair share", n0 == 5 && n1 == 5);
    end
    idle();
    // 4. full output blocks
    req_valid[0] = 1; req_head[0] = 1; req_tail[0] = 1; req_port[0] = 2; out_full[2] = 1;
    #1; expect1("full blocks head", !pop[0] && !sel_valid[2]);
    out_full[2] = 0;
    #1; expect1("space grants head", pop[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
