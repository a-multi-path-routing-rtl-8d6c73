// tb_ni_rx: feeds hand-built packets (reference check fields) into a
// receiving NI through a credit-counting sender and checks what is delivered:
// clean packets arrive intact with their header fields, a single-bit error is
// corrected, a copy with a double error is rejected and the next copy of the
// group is delivered instead, later copies of an accepted group are dropped,
// a group with no good copy is reported lost, and delivery follows out_ready.
module tb_ni_rx;
  import noc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid, credit_out, out_valid, out_ready, out_last, out_critical;
  flit_t in_flit;
  logic [DATA_W-1:0] out_data;
  logic [ADDR_W-1:0] out_src;
  logic [COMM_W-1:0] out_comm;
  logic [PID_W-1:0] out_pid;
  logic corrected_event, error_event, dup_event, lost_event;
  int checks = 0, failures = 0;
  int n_corr = 0, n_err = 0, n_dup = 0, n_lost = 0;
  int credits;
  flit_t txq [$];
  // delivered words: {pid, comm, last, data}
  typedef struct { int pid; int comm; int src; logic last; logic [DATA_W-1:0] data; } word_t;
  word_t rxq [$];

  ni_rx #(.MAX_PAYLOAD(4), .DEPTH(DEPTH), .N_COMM(NUM_COMM)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst_n) begin
      credits <= DEPTH;
    end else begin
      if (out_valid && out_ready) rxq.push_back('{int'(out_pid), int'(out_comm), int'(out_src), out_last, out_data});
      n_corr += int'(corrected_event);
      n_err  += int'(error_event);
      n_dup  += int'(dup_event);
      n_lost += int'(lost_event);
      credits <= credits + (credit_out ? 1 : 0) - (in_valid ? 1 : 0);
    end
  end

  // sender
  always @(negedge clk) begin
    in_valid = 0;
    if (rst_n && credits > (in_valid ? 1 : 0) && txq.size() > 0) begin
      in_valid = 1;
      in_flit = txq.pop_front();
    end
    out_ready = ($urandom_range(3) != 0);
  end

  task automatic expect1(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // queue a packet; flip1/flip2 are codeword bits to flip in payload word 0 (-1 = none)
  task automatic queue_pkt(int comm, int pid, logic crit, logic last, int n, logic [DATA_W-1:0] base,
                           int flip1 = -1, int flip2 = -1);
    head_t h;
    flit_t f;
    h = '0;
    h.comm = COMM_W'(comm); h.pid = PID_W'(pid); h.src = 8'd7; h.dst = 8'd2;
    h.critical = crit; h.last_copy = last; h.route = 30'h0000_0000;
    txq.push_back(ref_flit(1'b1, 1'b0, put_head(h)));
    for (int i = 0; i < n; i++) begin
      f = ref_flit(1'b0, i == n - 1, base + DATA_W'(i));
      if (i == 0 && flip1 >= 0) {f.ecc, f.data} ^= (ECC_W+DATA_W)'(1) << flip1;
      if (i == 0 && flip2 >= 0) {f.ecc, f.data} ^= (ECC_W+DATA_W)'(1) << flip2;
      txq.push_back(f);
    end
  endtask

  task automatic expect_pkt(int comm, int pid, int n, logic [DATA_W-1:0] base);
    word_t w;
    for (int i = 0; i < n; i++) begin
      expect1("word present", rxq.size() > 0);
      if (rxq.size() == 0) return;
      w = rxq.pop_front();
      expect1($sformatf("comm/pid %0d/%0d exp %0d/%0d", w.comm, w.pid, comm, pid), w.comm == comm && w.pid == pid && w.src == 7);
      expect1($sformatf("data %h exp %h", w.data, base + DATA_W'(i)), w.data == base + DATA_W'(i));
      expect1("last", w.last == (i == n - 1));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    queue_pkt(3, 1, 0, 1, 3, 64'hA00);                 // clean
    queue_pkt(3, 2, 0, 1, 2, 64'hB00, 17);             // single-bit error, corrected
    queue_pkt(4, 1, 1, 0, 2, 64'hC00, 5, 40);          // critical copy 1: double error
    queue_pkt(4, 2, 1, 0, 2, 64'hC00);                 // copy 2: accepted
    queue_pkt(4, 3, 1, 1, 2, 64'hC00);                 // copy 3: duplicate, dropped
    queue_pkt(4, 4, 1, 0, 1, 64'hD00, 1, 2);           // group with no good copy
    queue_pkt(4, 5, 1, 1, 1, 64'hD00, 60, 70);
    queue_pkt(4, 6, 1, 0, 4, 64'hE00);                 // next group: first copy good
    queue_pkt(4, 7, 1, 1, 4, 64'hE00);
    queue_pkt(9, 1, 0, 1, 4, 64'hF00, 71);             // error in a check bit only
    repeat (400) @(posedge clk);
    expect_pkt(3, 1, 3, 64'hA00);
    expect_pkt(3, 2, 2, 64'hB00);
    expect_pkt(4, 2, 2, 64'hC00);
    expect_pkt(4, 6, 4, 64'hE00);
    expect_pkt(9, 1, 4, 64'hF00);
    expect1("nothing else delivered", rxq.size() == 0);
    expect1($sformatf("corrected %0d", n_corr), n_corr == 2);
    expect1($sformatf("errors %0d", n_err), n_err == 3);
    expect1($sformatf("dups %0d", n_dup), n_dup == 2);
    expect1($sformatf("lost %0d", n_lost), n_lost == 1);
    expect1("all credits back", credits == DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
