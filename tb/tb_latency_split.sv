// tb_latency_split: average packet latency of one commodity with one path
// against two paths, on the default 4 x 3 mesh with background traffic.
//
// Commodity 1, node 0 -> node 3, offers one 4-word packet every 10 cycles.
// Route A runs along the top row (0,1,2,3); route B goes round through the
// second row (0,4,5,6,7,3). Two single-path background flows load route A:
// node 1 -> node 2 and node 2 -> node 7 (through 2->3->7), each sending as
// fast as its NI allows. In the first run commodity 1 may only use route A;
// in the second run it splits 50/50 over A and B with the re-order check at
// node 3. Latency is counted from the cycle a packet is offered to the cycle
// its last word is delivered. The test checks that every packet arrives in
// order in both runs and that the split lowers the average latency, which is
// the effect the multi-path scheme is built for. With these path lengths a
// packet on route A is delayed by at most one background packet, which is
// less than the head start of the next packet on the longer route B, so
// packets rarely overtake here; the stall count is printed for information.
// Overtaking and the re-order stall are exercised in tb_mpnoc_mesh.
module tb_latency_split;
  import noc_pkg::*;

  localparam int COLS = 4, ROWS = 3, NN = COLS * ROWS, NPKT = 80, LEN = 4, GAP = 10;

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic core_valid [NN], core_ready [NN], core_critical [NN], core_last [NN];
  logic [DATA_W-1:0] core_data [NN];
  logic [2:0] core_flow [NN];
  logic rx_valid [NN], rx_ready [NN], rx_last [NN], rx_critical [NN];
  logic [DATA_W-1:0] rx_data [NN];
  logic [ADDR_W-1:0] rx_src [NN];
  logic [COMM_W-1:0] rx_comm [NN];
  logic [PID_W-1:0] rx_pid [NN];
  logic stall_event [NN], copy_event [NN], corrected_event [NN], error_event [NN];
  logic dup_event [NN], lost_event [NN];

  mpnoc_mesh dut (
    .clk, .rst_n, .cfg, .core_valid, .core_ready, .core_data, .core_flow, .core_critical,
    .core_last, .rx_valid, .rx_ready, .rx_data, .rx_last, .rx_src, .rx_comm, .rx_pid,
    .rx_critical, .stall_event, .copy_event, .corrected_event, .error_event, .dup_event,
    .lost_event, .inj_valid(1'b0), .inj_node(8'd0), .inj_port(3'd0), .inj_mask('0));

  int checks = 0, failures = 0, cycle = 0;
  int offered [NPKT];
  int next_seq, widx, lat_sum, stalls;
  logic running;

  always #5 clk = ~clk;

  task automatic expect1(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [ROUTE_W-1:0] mk_route(int hops [$]);
    logic [ROUTE_W-1:0] r;
    r = '0;
    foreach (hops[i]) r |= ROUTE_W'(hops[i]) << (PORT_W * i);
    return r;
  endfunction

  task automatic write_cfg(int node, cfg_kind_e k, int idx, int path, logic [63:0] d);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.node = 8'(node); cfg.kind = k; cfg.index = 6'(idx);
    cfg.path = 2'(path); cfg.data = d;
    @(negedge clk);
    cfg.we = 0;
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int n = 0; n < NN; n++) stalls += int'(stall_event[n]);
      if (rx_valid[3]) begin
        checks++;
        if (rx_data[3] != 64'((next_seq << 8) | widx)) begin
          failures++; $display("FAIL got %h expected packet %0d word %0d", rx_data[3], next_seq, widx);
        end
        if (rx_last[3]) begin
          lat_sum += cycle - offered[next_seq];
          widx = 0;
          next_seq++;
        end else widx++;
      end
    end
  end

  // background flow: local flow 0 of `node`, back-to-back packets while running
  task automatic background(int node);
    int s;
    s = 0;
    while (running) begin
      for (int i = 0; i < LEN; i++) begin
        @(negedge clk);
        core_valid[node] = 1; core_flow[node] = 0; core_critical[node] = 0;
        core_last[node] = (i == LEN - 1); core_data[node] = 64'(s);
        @(posedge clk);
        while (!core_ready[node]) @(posedge clk);
      end
      @(negedge clk); core_valid[node] = 0;
      s++;
    end
  endtask

  // offered load of commodity 1: a packet every GAP cycles, queued at the source
  task automatic source();
    int q [$];
    int k;
    k = 0;
    fork
      begin
        for (int s = 0; s < NPKT; s++) begin
          offered[s] = cycle;
          q.push_back(s);
          repeat (GAP) @(posedge clk);
        end
      end
      begin
        while (k < NPKT) begin
          if (q.size() == 0) begin
            @(posedge clk);
          end else begin
            int s;
            s = q.pop_front();
            for (int i = 0; i < LEN; i++) begin
              @(negedge clk);
              core_valid[0] = 1; core_flow[0] = 0; core_critical[0] = 0;
              core_last[0] = (i == LEN - 1); core_data[0] = 64'((s << 8) | i);
              @(posedge clk);
              while (!core_ready[0]) @(posedge clk);
            end
            @(negedge clk); core_valid[0] = 0;
            k++;
          end
        end
      end
    join
  endtask

  task automatic run(logic split, output int avg);
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    next_seq = 0; widx = 0; lat_sum = 0; stalls = 0;
    write_cfg(0, CFG_NI_FLOW, 0, 0, 64'((1 << 14) | (3 << 6) | 1));
    write_cfg(0, CFG_NI_PATH, 0, 0, {24'd0, 1'b1, split ? 9'd128 : 9'd256,
                                     mk_route('{P_EAST, P_EAST, P_EAST, P_LOCAL})});
    write_cfg(0, CFG_NI_PATH, 0, 1, {24'd0, split, 9'd256,
                                     mk_route('{P_SOUTH, P_EAST, P_EAST, P_EAST, P_NORTH, P_LOCAL})});
    write_cfg(3, CFG_SW_REORDER, 1, 0, 64'd1);
    write_cfg(1, CFG_NI_FLOW, 0, 0, 64'((1 << 14) | (2 << 6) | 2));
    write_cfg(1, CFG_NI_PATH, 0, 0, {24'd0, 1'b1, 9'd256, mk_route('{P_EAST, P_LOCAL})});
    write_cfg(2, CFG_NI_FLOW, 0, 0, 64'((1 << 14) | (7 << 6) | 3));
    write_cfg(2, CFG_NI_PATH, 0, 0, {24'd0, 1'b1, 9'd256, mk_route('{P_EAST, P_SOUTH, P_LOCAL})});
    running = 1;
    fork
      background(1);
      background(2);
      begin
        source();
        wait (next_seq == NPKT);
        running = 0;
      end
    join
    repeat (50) @(posedge clk);
    expect1($sformatf("all %0d packets in order (%0d)", NPKT, next_seq), next_seq == NPKT);
    avg = lat_sum / NPKT;
    $display("%s: average latency %0d cycles, re-order stall cycles %0d",
             split ? "two paths " : "one path  ", avg, stalls);
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int single_avg, multi_avg;
    cfg = '0; running = 0;
    for (int n = 0; n < NN; n++) begin
      core_valid[n] = 0; core_data[n] = '0; core_flow[n] = 0; core_critical[n] = 0;
      core_last[n] = 0; rx_ready[n] = 1;
    end
    run(1'b0, single_avg);
    run(1'b1, multi_avg);
    expect1($sformatf("split lowers latency: %0d vs %0d", multi_avg, single_avg), multi_avg < single_avg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
