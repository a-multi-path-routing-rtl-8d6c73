// tb_critical_sweep: the share of critical traffic swept from 0 % to 100 % in
// 20 % steps on the default 4 x 3 mesh, with two copies per critical packet
// (one duplicate, enough for bit-error rates of 1e-6 and below).
//
// One commodity, node 0 -> node 10, two non-intersecting 5-switch routes
// (E,E,S,S and S,S,E,E) with a 50/50 split and the re-order check at node 10.
// Each step sends 20 packets of 2 payload words. The test counts every flit
// leaving any switch output and checks it against the exact figure:
// 3 flits x 5 switches x (packets + critical packets). It also checks that
// every step delivers its 20 packets once and in order, and prints the
// network traffic normalised to the 0 % step (1.0, 1.2, ... 2.0).
module tb_critical_sweep;
  import noc_pkg::*;

  localparam int COLS = 4, ROWS = 3, NN = COLS * ROWS, NPKT = 20, LEN = 2;

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

  int checks = 0, failures = 0;
  int flits = 0, delivered = 0, next_seq = 0, widx = 0;

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
    if (rst_n) begin
      for (int n = 0; n < NN; n++)
        for (int p = 0; p < NPORTS; p++)
          flits += int'(dut.sw_out_valid[n][p]);
      if (rx_valid[10]) begin
        checks++;
        if (rx_data[10] != 64'((next_seq << 8) | widx) || rx_last[10] != (widx == LEN - 1)) begin
          failures++; $display("FAIL got %h expected packet %0d word %0d", rx_data[10], next_seq, widx);
        end
        if (rx_last[10]) begin widx = 0; next_seq++; delivered++; end
        else widx++;
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base, seq;
    cfg = '0;
    for (int n = 0; n < NN; n++) begin
      core_valid[n] = 0; core_data[n] = '0; core_flow[n] = 0; core_critical[n] = 0;
      core_last[n] = 0; rx_ready[n] = 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    write_cfg(0, CFG_NI_FLOW, 0, 0, 64'((2 << 14) | (10 << 6) | 4));
    write_cfg(0, CFG_NI_PATH, 0, 0, {24'd0, 1'b1, 9'd128, mk_route('{P_EAST, P_EAST, P_SOUTH, P_SOUTH, P_LOCAL})});
    write_cfg(0, CFG_NI_PATH, 0, 1, {24'd0, 1'b1, 9'd256, mk_route('{P_SOUTH, P_SOUTH, P_EAST, P_EAST, P_LOCAL})});
    write_cfg(10, CFG_SW_REORDER, 4, 0, 64'd1);
    base = 0;
    seq = 0;
    for (int pct = 0; pct <= 100; pct += 20) begin
      int ncrit, start_flits, start_del, exp;
      ncrit = NPKT * pct / 100;
      start_flits = flits;
      start_del = delivered;
      for (int k = 0; k < NPKT; k++) begin
        for (int i = 0; i < LEN; i++) begin
          @(negedge clk);
          core_valid[0] = 1; core_flow[0] = 0; core_last[0] = (i == LEN - 1);
          core_critical[0] = (k < ncrit);
          core_data[0] = 64'((seq << 8) | i);
          @(posedge clk);
          while (!core_ready[0]) @(posedge clk);
        end
        @(negedge clk); core_valid[0] = 0;
        seq++;
      end
      wait (delivered == start_del + NPKT);
      repeat (30) @(posedge clk);
      exp = (LEN + 1) * 5 * (NPKT + ncrit);
      expect1($sformatf("%0d %% critical: %0d flit transfers, expected %0d", pct, flits - start_flits, exp),
              flits - start_flits == exp);
      if (pct == 0) base = flits - start_flits;
      $display("critical %3d %%: network traffic %0d flits, normalised %0d.%02d", pct,
               flits - start_flits, (flits - start_flits) / base, ((flits - start_flits) * 100 / base) % 100);
    end
    expect1("all packets delivered", delivered == 6 * NPKT && next_seq == 6 * NPKT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
