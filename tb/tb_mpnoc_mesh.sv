// tb_mpnoc_mesh: end-to-end test of the 4 x 3 mesh at its default size.
//
// Three commodities, each with two non-intersecting source routes and the
// re-order check enabled at the destination switch where the routes meet:
//   comm 1: node 0 -> node 5, routes of 2 and 4 hops (50/50), so packets on
//           the short route overtake and must be held back (stalls);
//   comm 2: node 3 -> node 8, critical, n_t = 2 copies per packet, one on
//           each route; double-bit errors are injected on a link used only
//           by one route, so a rejected copy is replaced by the other one,
//           and the surviving spare copies are dropped as duplicates;
//   comm 3: node 6 -> node 11 (25/75); half way through, route B is marked
//           failed and all later traffic must use route A.
// Single-bit errors are injected on the delivery link of node 5 and must be
// corrected. Each commodity's payload carries a sequence number: the test
// checks that every packet arrives once, whole and in order, and counts each
// mechanism (stall, copy, correction, rejected copy, dropped duplicate, path
// failure), failing if one never happened or a packet was lost.
module tb_mpnoc_mesh;
  import noc_pkg::*;

  localparam int COLS = 4, ROWS = 3, NN = COLS * ROWS;
  localparam int NPKT [4] = '{0, 60, 30, 40};
  localparam int SRC  [4] = '{0, 0, 3, 6};
  localparam int DST  [4] = '{0, 5, 8, 11};

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
  logic inj_valid;
  logic [7:0] inj_node;
  logic [PORT_W-1:0] inj_port;
  logic [ECC_W+DATA_W-1:0] inj_mask;

  mpnoc_mesh dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_copy = 0, n_corr = 0, n_err = 0, n_dup = 0, n_lost = 0;
  int next_seq [4] = '{0, 0, 0, 0};
  int word_idx [4] = '{0, 0, 0, 0};
  int done_pkts = 0, after_fail = 0;
  logic path_failed = 0;
  int fail_cycle = 0, late_b_flits = 0;

  // route B of comm 3 leaves node 6 southwards; nothing may go there once the
  // failure is known and the packets already under way have drained
  always @(posedge clk)
    if (path_failed && cycle > fail_cycle + 40 && dut.sw_out_valid[6][P_SOUTH]) late_b_flits++;

  always #5 clk = ~clk;

  task automatic expect1(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
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

  task automatic set_path(int node, int flow, int path, logic en, int thr, int hops [$]);
    write_cfg(node, CFG_NI_PATH, flow, path, {24'd0, en, 9'(thr), mk_route(hops)});
  endtask

  // payload word i of packet `seq` of commodity c
  function automatic logic [DATA_W-1:0] word(int c, int seq, int i);
    return {8'(c), 24'(seq), 32'(i)};
  endfunction

  function automatic int plen(int c, int seq);
    return 1 + ((seq * 7 + c) % 4);
  endfunction

  // one injector per commodity, flow number 0 at its source node
  task automatic inject(int c, logic crit);
    int n;
    n = SRC[c];
    for (int s = 0; s < NPKT[c]; s++) begin
      for (int i = 0; i < plen(c, s); i++) begin
        core_valid[n] = 1; core_flow[n] = 0; core_critical[n] = crit;
        core_last[n] = (i == plen(c, s) - 1); core_data[n] = word(c, s, i);
        @(posedge clk);
        while (!core_ready[n]) @(posedge clk);
        @(negedge clk);
      end
      core_valid[n] = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  // receivers and event counters
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        n_stall += int'(stall_event[n]);
        n_copy  += int'(copy_event[n]);
        n_corr  += int'(corrected_event[n]);
        n_err   += int'(error_event[n]);
        n_dup   += int'(dup_event[n]);
        n_lost  += int'(lost_event[n]);
        if (rx_valid[n] && rx_ready[n]) begin
          int c;
          c = int'(rx_comm[n]);
          checks++;
          if (c < 1 || c > 3 || DST[c] != n || int'(rx_src[n]) != SRC[c] ||
              rx_data[n] != word(c, next_seq[c], word_idx[c]) ||
              rx_last[n] != (word_idx[c] == plen(c, next_seq[c]) - 1)) begin
            failures++;
            $display("FAIL node %0d got %h comm %0d, expected seq %0d word %0d", n, rx_data[n], c,
                     next_seq[c], word_idx[c]);
          end else if (rx_last[n]) begin
            next_seq[c]++;
            word_idx[c] = 0;
            done_pkts++;
            if (c == 3 && path_failed) after_fail++;
          end else begin
            word_idx[c]++;
          end
        end
      end
    end
  end

  // error injection: body flits only, so headers always stay readable
  always @(negedge clk) begin
    inj_valid = 0; inj_node = 0; inj_port = 0; inj_mask = '0;
    if (rst_n) begin
      // node 2 west link: only comm 2 route A crosses it -> double errors
      if (dut.sw_out_valid[2][P_WEST] && !dut.sw_out_flit[2][P_WEST].head && $urandom_range(3) == 0) begin
        int a, b;
        a = $urandom_range(ECC_W + DATA_W - 1);
        b = (a + 1 + $urandom_range(ECC_W + DATA_W - 2)) % (ECC_W + DATA_W);
        inj_valid = 1; inj_node = 2; inj_port = P_WEST;
        inj_mask = ((ECC_W+DATA_W)'(1) << a) | ((ECC_W+DATA_W)'(1) << b);
      end else if (dut.sw_out_valid[5][P_LOCAL] && !dut.sw_out_flit[5][P_LOCAL].head &&
                   $urandom_range(3) == 0) begin
        inj_valid = 1; inj_node = 5; inj_port = P_LOCAL;
        inj_mask = (ECC_W+DATA_W)'(1) << $urandom_range(ECC_W + DATA_W - 1);
      end
    end
    for (int n = 0; n < NN; n++) rx_ready[n] = ($urandom_range(7) != 0);
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets delivered", done_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    for (int n = 0; n < NN; n++) begin
      core_valid[n] = 0; core_data[n] = '0; core_flow[n] = 0; core_critical[n] = 0; core_last[n] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // comm 1: 0 -> 5; A: E,S   B: S,S,E,N
    write_cfg(0, CFG_NI_FLOW, 0, 0, 64'((1 << 14) | (5 << 6) | 1));
    set_path(0, 0, 0, 1, 128, '{P_EAST, P_SOUTH, P_LOCAL});
    set_path(0, 0, 1, 1, 256, '{P_SOUTH, P_SOUTH, P_EAST, P_NORTH, P_LOCAL});
    write_cfg(5, CFG_SW_REORDER, 1, 0, 64'd1);
    // comm 2: 3 -> 8, two copies; A: W,W,W,S,S   B: S,S,W,W,W
    write_cfg(3, CFG_NI_FLOW, 0, 0, 64'((2 << 14) | (8 << 6) | 2));
    set_path(3, 0, 0, 1, 128, '{P_WEST, P_WEST, P_WEST, P_SOUTH, P_SOUTH, P_LOCAL});
    set_path(3, 0, 1, 1, 256, '{P_SOUTH, P_SOUTH, P_WEST, P_WEST, P_WEST, P_LOCAL});
    write_cfg(8, CFG_SW_REORDER, 2, 0, 64'd1);
    // comm 3: 6 -> 11; A: E,S   B: S,E
    write_cfg(6, CFG_NI_FLOW, 0, 0, 64'((1 << 14) | (11 << 6) | 3));
    set_path(6, 0, 0, 1, 64,  '{P_EAST, P_SOUTH, P_LOCAL});
    set_path(6, 0, 1, 1, 256, '{P_SOUTH, P_EAST, P_LOCAL});
    write_cfg(11, CFG_SW_REORDER, 3, 0, 64'd1);

    fork
      inject(1, 0);
      inject(2, 1);
      begin
        fork
          inject(3, 0);
          begin
            wait (next_seq[3] >= NPKT[3] / 2);
            set_path(6, 0, 1, 0, 256, '{P_SOUTH, P_EAST, P_LOCAL});
            path_failed = 1;
            fail_cycle = cycle;
          end
        join
      end
    join
    wait (done_pkts == NPKT[1] + NPKT[2] + NPKT[3]);
    repeat (20) @(posedge clk);
    for (int c = 1; c <= 3; c++)
      expect1($sformatf("comm %0d delivered %0d of %0d", c, next_seq[c], NPKT[c]), next_seq[c] == NPKT[c]);
    $display("mechanisms: stalls=%0d copies=%0d corrected=%0d rejected=%0d duplicates=%0d lost=%0d after_path_fail=%0d",
             n_stall, n_copy, n_corr, n_err, n_dup, n_lost, after_fail);
    expect1("out-of-order stall happened", n_stall > 0);
    expect1("replica copies sent", n_copy == NPKT[2]);
    expect1("single-bit errors corrected", n_corr > 0);
    expect1("copies with double errors rejected", n_err > 0);
    expect1("spare copies dropped as duplicates", n_dup > 0);
    expect1("some copies replaced after a rejection", n_dup < NPKT[2]);
    expect1("failed route B unused after the failure", late_b_flits == 0);
    expect1("no packet lost", n_lost == 0);
    expect1("traffic after path failure", after_fail > 0);
    $display("finished at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
