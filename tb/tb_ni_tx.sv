// tb_ni_tx: programs two flows of a source NI and captures what it sends.
// Checks, against values worked out here: the head fields (commodity,
// destination, source, identifier counting from 1 per flow, critical and
// last_copy), the check field of every flit (reference code), payload order
// and tail marking, n_t copies with consecutive identifiers for a critical
// packet spread over the enabled paths in turn, that a disabled path is never
// used, and that the NI never has more flits outstanding than credits.
module tb_ni_tx;
  import noc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int CREDITS = 2;
  localparam logic [ROUTE_W-1:0] R [4] = '{30'h0012_3450, 30'h0ABC_DEF1, 30'h0000_0002, 30'h0246_8ACE};

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic core_valid, core_ready, core_critical, core_last;
  logic [DATA_W-1:0] core_data;
  logic [2:0] core_flow;
  logic out_valid, credit_in, copy_event;
  flit_t out_flit;
  int checks = 0, failures = 0;
  int outstanding = 0, copies_seen = 0;
  flit_t got [$];

  ni_tx #(.N_FLOWS(8), .MAX_PAYLOAD(4), .CREDITS(CREDITS)) dut (
    .clk, .rst_n, .my_addr(8'd3), .cfg,
    .core_valid, .core_ready, .core_data, .core_flow, .core_critical, .core_last,
    .out_valid, .out_flit, .credit_in, .copy_event);

  always #5 clk = ~clk;

  logic hold_credits = 0;
  // receiver: takes every flit, returns its credit a cycle later
  always @(posedge clk) begin
    if (!rst_n) begin
      credit_in   <= 0;
      outstanding <= 0;
    end else begin
      logic give;
      if (out_valid) got.push_back(out_flit);
      if (copy_event) copies_seen++;
      give = !hold_credits && (outstanding + (out_valid ? 1 : 0) > 0);
      credit_in   <= give;
      outstanding <= outstanding + (out_valid ? 1 : 0) - (give ? 1 : 0);
      if (outstanding > CREDITS) begin failures++; $display("FAIL outstanding %0d", outstanding); end
    end
  end

  task automatic expect1(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_cfg(cfg_kind_e k, int idx, int path, logic [63:0] d, int node = 3);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.node = 8'(node); cfg.kind = k; cfg.index = 6'(idx); cfg.path = 2'(path); cfg.data = d;
    @(posedge clk); @(negedge clk);
    cfg.we = 0;
  endtask

  task automatic send_pkt(int flow, logic crit, int n, logic [DATA_W-1:0] base);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      core_valid = 1; core_flow = 3'(flow); core_critical = crit; core_last = (i == n - 1);
      core_data = base + DATA_W'(i);
      @(posedge clk);
      while (!core_ready) @(posedge clk);
    end
    @(negedge clk); core_valid = 0;
  endtask

  // checks one captured packet; returns its route index
  task automatic check_pkt(int comm, int dst, int pid, logic crit, logic last, int n,
                           logic [DATA_W-1:0] base, logic [3:0] allowed, output int ridx);
    flit_t f;
    head_t h;
    ridx = -1;
    expect1("enough flits", got.size() >= n + 1);
    if (got.size() < n + 1) return;
    f = got.pop_front();
    h = get_head(f.data);
    expect1("head flag", f.head && !f.tail);
    expect1("head ecc", f.ecc == ref_ecc(ecc_view(1'b1, f.data)));
    expect1("comm", int'(h.comm) == comm);
    expect1("dst", int'(h.dst) == dst);
    expect1("src", h.src == 8'd3);
    expect1($sformatf("pid %0d exp %0d", h.pid, pid), int'(h.pid) == pid);
    expect1("critical", h.critical == crit);
    expect1("last_copy", h.last_copy == last);
    for (int j = 0; j < 4; j++) if (h.route == R[j]) ridx = j;
    expect1("route is an enabled path", ridx >= 0 && allowed[ridx]);
    for (int i = 0; i < n; i++) begin
      f = got.pop_front();
      expect1("payload", !f.head && f.data == base + DATA_W'(i) && f.tail == (i == n - 1));
      expect1("payload ecc", f.ecc == ref_ecc(f.data));
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0, r1, r2;
    cfg = '0; core_valid = 0; core_data = '0; core_flow = 0; core_critical = 0; core_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // flow 2: commodity 5 to node 9, n_t = 3, paths 0,1,3 enabled (2 disabled)
    write_cfg(CFG_NI_FLOW, 2, 0, 64'((3 << 14) | (9 << 6) | 5));
    write_cfg(CFG_NI_PATH, 2, 0, {24'd0, 1'b1, 9'd64,  R[0]});
    write_cfg(CFG_NI_PATH, 2, 1, {24'd0, 1'b1, 9'd128, R[1]});
    write_cfg(CFG_NI_PATH, 2, 2, {24'd0, 1'b0, 9'd192, R[2]});
    write_cfg(CFG_NI_PATH, 2, 3, {24'd0, 1'b1, 9'd256, R[3]});
    // a write addressed to another node must be ignored
    write_cfg(CFG_NI_FLOW, 2, 0, 64'((1 << 14) | (7 << 6) | 1), 4);
    // flow 0: commodity 1 to node 6, single path 2
    write_cfg(CFG_NI_FLOW, 0, 0, 64'((1 << 14) | (6 << 6) | 1));
    write_cfg(CFG_NI_PATH, 0, 2, {24'd0, 1'b1, 9'd256, R[2]});

    send_pkt(2, 0, 3, 64'h100);
    repeat (20) @(posedge clk);
    check_pkt(5, 9, 1, 0, 1, 3, 64'h100, 4'b1011, r0);
    expect1("all flits accounted", got.size() == 0);

    send_pkt(2, 1, 2, 64'h200);
    repeat (40) @(posedge clk);
    check_pkt(5, 9, 2, 1, 0, 2, 64'h200, 4'b1011, r0);
    check_pkt(5, 9, 3, 1, 0, 2, 64'h200, 4'b1011, r1);
    check_pkt(5, 9, 4, 1, 1, 2, 64'h200, 4'b1011, r2);
    expect1("copies on distinct paths", r0 != r1 && r1 != r2 && r0 != r2);
    expect1("copy rotation", r1 == ((r0 == 0) ? 1 : (r0 == 1) ? 3 : 0));
    expect1("copy events", copies_seen == 2);

    // flow 0 numbers its own packets from 1
    send_pkt(0, 0, 1, 64'h300);
    repeat (20) @(posedge clk);
    check_pkt(1, 6, 1, 0, 1, 1, 64'h300, 4'b0100, r0);

    // credits withheld: at most CREDITS flits leave
    hold_credits = 1;
    send_pkt(0, 0, 4, 64'h400);
    repeat (20) @(posedge clk);
    expect1("credit stop", got.size() == CREDITS);
    hold_credits = 0;
    repeat (20) @(posedge clk);
    check_pkt(1, 6, 2, 0, 1, 4, 64'h400, 4'b0100, r0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
