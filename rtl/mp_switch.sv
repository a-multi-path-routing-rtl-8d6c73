// mp_switch: wormhole switch with the in-order delivery check, the switch of
// the multi-path NoC.
//
// Structure (after the reference switch organisation): one input_buffer per input
// port, a reorder_lut holding the next expected packet identifier per
// commodity, the inorder_arbiter, the crossbar and one output_buffer per output
// port. The front head flit of every input reads its output port from the low
// PORT_W bits of its source route, and its commodity and identifier go to the
// look-up table. Where the table's check is enabled for the commodity (at the
// switch where the commodity's non-intersecting paths meet again) a head flit
// whose identifier is not the expected one is not granted and waits in its
// input buffer; the packet carrying the expected identifier comes in on
// another input, so nothing is dropped. Elsewhere the switch forwards packets
// in plain wormhole fashion.
//
// Links: in_valid/in_flit with credit_out (one credit per freed input slot),
// out_valid/out_flit with credit_in (one credit per slot freed downstream).
// Latency through an idle switch is 2 cycles from in_valid to out_valid (one
// in the input buffer, one in the output buffer).
// cfg_we/cfg_comm/cfg_en turn the check on or off for one commodity.
// stall_event pulses for every cycle a head flit is held back as out of order.
module mp_switch
  import noc_pkg::*;
#(
  parameter int unsigned N         = NPORTS,
  parameter int unsigned IN_DEPTH  = 2,
  parameter int unsigned OUT_DEPTH = 4,
  parameter int unsigned CREDITS   = 2     // depth of the downstream input buffers
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid   [N],
  input  flit_t             in_flit    [N],
  output logic              credit_out [N],
  output logic              out_valid  [N],
  output flit_t             out_flit   [N],
  input  logic              credit_in  [N],
  input  logic              cfg_we,
  input  logic [COMM_W-1:0] cfg_comm,
  input  logic              cfg_en,
  output logic              stall_event
);

  localparam int unsigned IW = $clog2(N);

  logic              q_valid [N];
  flit_t             q_flit  [N];
  logic              pop     [N];
  logic              req_head [N];
  logic              req_tail [N];
  logic [PORT_W-1:0] req_port [N];
  logic [COMM_W-1:0] lk_comm  [N];
  logic [PID_W-1:0]  lk_pid   [N];
  logic              in_order [N];
  logic              lut_inc  [N];
  logic              stalled  [N];
  logic              out_full [N];
  logic              sel_valid [N];
  logic [IW-1:0]     sel       [N];
  logic              xb_valid  [N];
  flit_t             xb_flit   [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    input_buffer #(.DEPTH(IN_DEPTH)) u_ib (
      .clk, .rst_n,
      .in_valid  (in_valid[i]),
      .in_flit   (in_flit[i]),
      .credit_out(credit_out[i]),
      .out_valid (q_valid[i]),
      .out_flit  (q_flit[i]),
      .out_pop   (pop[i])
    );
    head_t h;
    assign h           = get_head(q_flit[i].data);
    assign req_head[i] = q_flit[i].head;
    assign req_tail[i] = q_flit[i].tail;
    assign req_port[i] = h.route[PORT_W-1:0];
    assign lk_comm[i]  = h.comm;
    assign lk_pid[i]   = h.pid;
  end

  reorder_lut #(.N_COMM(NUM_COMM), .N_LOOK(N), .ID_W(PID_W)) u_lut (
    .clk, .rst_n,
    .cfg_we, .cfg_comm, .cfg_en,
    .lk_comm, .lk_pid, .in_order,
    .inc     (lut_inc),
    .inc_comm(lk_comm)
  );

  inorder_arbiter #(.N_IN(N), .N_OUT(N)) u_arb (
    .clk, .rst_n,
    .req_valid(q_valid),
    .req_head, .req_tail, .req_port, .in_order, .out_full,
    .pop, .lut_inc, .sel_valid, .sel, .stalled
  );

  crossbar #(.N_IN(N), .N_OUT(N)) u_xbar (
    .in_flit  (q_flit),
    .sel_valid(sel_valid),
    .sel      (sel),
    .out_valid(xb_valid),
    .out_flit (xb_flit)
  );

  for (genvar o = 0; o < N; o++) begin : g_out
    output_buffer #(.DEPTH(OUT_DEPTH), .CREDITS(CREDITS)) u_ob (
      .clk, .rst_n,
      .in_push   (xb_valid[o]),
      .in_flit   (xb_flit[o]),
      .full      (out_full[o]),
      .link_valid(out_valid[o]),
      .link_flit (out_flit[o]),
      .credit_in (credit_in[o])
    );
  end

  always_comb begin
    stall_event = 1'b0;
    for (int i = 0; i < int'(N); i++) stall_event |= stalled[i];
  end

endmodule
