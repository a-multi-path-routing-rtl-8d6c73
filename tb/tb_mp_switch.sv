// tb_mp_switch: drives a 5-port switch from credit-counting senders and
// collects its outputs with sinks that return credits a cycle later.
//   1. latency: a lone packet's head leaves 2 cycles after it arrived, with
//      its route advanced by one hop, and a 21-flit packet leaves in 21
//      consecutive cycles (one flit per cycle through the credit loop);
//   2. in-order check: with the check enabled for commodity 7, packet 2 that
//      arrives first on one input waits (stall events counted) until packet 1
//      has passed from another input; same again for packets 3 and 4 arriving
//      together;
//   3. a commodity without the check passes any identifier;
//   4. random multi-flit traffic from all inputs: every packet arrives whole
//      (wormhole: its flits back to back on the output) at the output its
//      route names, in order per input/output pair.
module tb_mp_switch;
  import noc_pkg::*;

  localparam int N = 5, DEPTH = 2;
  logic clk = 0, rst_n = 0;
  logic  in_valid [N], credit_out [N], out_valid [N], credit_in [N];
  flit_t in_flit [N], out_flit [N];
  logic cfg_we, cfg_en;
  logic [COMM_W-1:0] cfg_comm;
  logic stall_event;
  int checks = 0, failures = 0, stalls = 0, cycle = 0;
  int credits [N];
  flit_t txq [N][$];
  flit_t rxq [N][$];
  int first_out [N];

  mp_switch #(.N(N), .IN_DEPTH(DEPTH), .OUT_DEPTH(4), .CREDITS(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int p = 0; p < N; p++) begin
      if (!rst_n) begin
        credits[p]   <= DEPTH;
        credit_in[p] <= 0;
      end else begin
        credits[p] <= credits[p] + (credit_out[p] ? 1 : 0) - (in_valid[p] ? 1 : 0);
        credit_in[p] <= out_valid[p];
        if (out_valid[p]) begin
          rxq[p].push_back(out_flit[p]);
          if (first_out[p] < 0) first_out[p] = cycle;
        end
      end
    end
    if (rst_n && stall_event) stalls++;
  end

  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      in_valid[p] = 0;
      if (rst_n && credits[p] > 0 && txq[p].size() > 0) begin
        in_valid[p] = 1;
        in_flit[p] = txq[p].pop_front();
      end
    end
  end

  task automatic expect1(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [ROUTE_W-1:0] mk_route(int p0, int p1, int p2);
    return ROUTE_W'(p0 | (p1 << 3) | (p2 << 6));
  endfunction

  // packet: head + n body flits; body data = {tag, index}
  task automatic queue_pkt(int inp, int comm, int pid, logic [ROUTE_W-1:0] route, int n, int tag);
    head_t h;
    flit_t f;
    h = '0; h.comm = COMM_W'(comm); h.pid = PID_W'(pid); h.route = route; h.src = 8'(inp);
    f = '0; f.head = 1; f.data = put_head(h);
    txq[inp].push_back(f);
    for (int i = 0; i < n; i++) begin
      f = '0; f.tail = (i == n - 1); f.data = DATA_W'((tag << 8) | i);
      txq[inp].push_back(f);
    end
  endtask

  function automatic int pid_of(flit_t f);
    head_t h;
    h = get_head(f.data);
    return int'(h.pid);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    flit_t f;
    head_t h;
    cfg_we = 0; cfg_en = 0; cfg_comm = 0;
    for (int p = 0; p < N; p++) begin in_valid[p] = 0; in_flit[p] = '0; first_out[p] = -1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_we = 1; cfg_comm = 7; cfg_en = 1;
    @(negedge clk); cfg_we = 0;

    // 1. latency and route shift
    @(negedge clk);
    queue_pkt(1, 20, 1, mk_route(3, 2, 4), 1, 1);
    @(posedge clk); t0 = cycle;     // the sender raises in_valid in this cycle
    repeat (10) @(posedge clk);
    expect1($sformatf("latency %0d", first_out[3] - t0), first_out[3] - t0 == 2);
    f = rxq[3].pop_front(); h = get_head(f.data);
    expect1("route advanced", h.route == mk_route(2, 4, 0));
    f = rxq[3].pop_front();
    expect1("body follows", f.tail && f.data == 64'h100);

    // 1b. throughput: a 21-flit packet leaves in 21 consecutive cycles
    begin
      int t_first, t_last, n_out;
      queue_pkt(1, 21, 1, mk_route(2, 0, 0), 20, 6);
      t_first = -1; n_out = 0;
      repeat (60) begin
        @(posedge clk);
        if (out_valid[2]) begin
          if (t_first < 0) t_first = cycle;
          t_last = cycle;
          n_out++;
        end
      end
      expect1($sformatf("full rate: %0d flits", n_out), n_out == 21);
      expect1($sformatf("back to back: %0d cycles", t_last - t_first + 1), t_last - t_first == 20);
      rxq[2].delete();
    end

    // 2. in-order check for commodity 7 at local output 0
    queue_pkt(2, 7, 2, mk_route(0, 0, 0), 2, 2);
    repeat (8) @(posedge clk);
    expect1("pid 2 held back", rxq[0].size() == 0);
    expect1("stall events", stalls > 0);
    queue_pkt(4, 7, 1, mk_route(0, 0, 0), 2, 1);
    repeat (15) @(posedge clk);
    expect1("both delivered", rxq[0].size() == 6);
    if (rxq[0].size() == 6) begin
      expect1("pid 1 first", pid_of(rxq[0][0]) == 1 && pid_of(rxq[0][3]) == 2);
      rxq[0].delete();
    end
    queue_pkt(1, 7, 4, mk_route(0, 0, 0), 1, 4);
    queue_pkt(3, 7, 3, mk_route(0, 0, 0), 1, 3);
    repeat (15) @(posedge clk);
    expect1("3 then 4", rxq[0].size() == 4 && pid_of(rxq[0][0]) == 3 && pid_of(rxq[0][2]) == 4);
    rxq[0].delete();

    // 3. commodity without the check
    queue_pkt(2, 8, 9, mk_route(0, 0, 0), 1, 5);
    repeat (10) @(posedge clk);
    expect1("unchecked commodity passes", rxq[0].size() == 2);
    rxq[0].delete();

    // 4. random traffic, commodity 8, no re-order check
    for (int k = 0; k < 60; k++) begin
      int inp, o;
      inp = $urandom_range(N - 1);
      o = $urandom_range(N - 1);
      queue_pkt(inp, 8, k, mk_route(o, 0, 0), $urandom_range(1, 4), (inp << 8) | k);
    end
    repeat (600) @(posedge clk);
    begin
      int heads;
      heads = 0;
      for (int o = 0; o < N; o++) foreach (rxq[o][j]) heads += int'(rxq[o][j].head);
      expect1($sformatf("all 60 packets out (%0d)", heads), heads == 60);
    end
    for (int o = 0; o < N; o++) begin
      int last_k [N];
      for (int i = 0; i < N; i++) last_k[i] = -1;
      while (rxq[o].size() > 0) begin
        int inp, k;
        f = rxq[o].pop_front();
        h = get_head(f.data);
        expect1("head first", f.head);
        inp = int'(h.src);
        k = int'(h.pid);
        expect1("routed out", h.route == '0);
        expect1("order per input", k > last_k[inp]);
        last_k[inp] = k;
        for (int i = 0; ; i++) begin
          f = rxq[o].pop_front();
          expect1("contiguous body", !f.head && f.data == DATA_W'((((inp << 8) | k) << 8) | i));
          if (f.tail) break;
        end
      end
    end
    for (int p = 0; p < N; p++) expect1("all sent", txq[p].size() == 0);
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
