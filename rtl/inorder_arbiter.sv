// inorder_arbiter: the switch arbiter, extended with the in-order rule.
//
// For every output a round-robin arbiter chooses among the inputs whose front
// flit is a head flit routed to that output and that the look-up table
// reports as in order; a head flit that is out of order is never granted and
// stays in its input buffer, as the scheme prescribes. A grant is also held
// back while the output buffer is full. Once a head flit is granted, the
// output is locked to that input (wormhole switching) and passes its body
// flits, one per cycle while the output buffer has room, until the tail flit
// releases it. Single-flit packets do not lock.
//
// The granted head of each input produces a look-up-table increment for its
// commodity in the same cycle (lut_inc). Everything is combinational except
// the lock and round-robin pointer registers, which change at the clock edge
// after the grant. Round-robin priority and the lock are this design's
// choices; the scheme does not say how the arbiter orders requests.
module inorder_arbiter
  import noc_pkg::*;
#(
  parameter int unsigned N_IN  = NPORTS,
  parameter int unsigned N_OUT = NPORTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req_valid [N_IN],
  input  logic                     req_head  [N_IN],
  input  logic                     req_tail  [N_IN],
  input  logic [PORT_W-1:0]        req_port  [N_IN],
  input  logic                     in_order  [N_IN],
  input  logic                     out_full  [N_OUT],
  output logic                     pop       [N_IN],
  output logic                     lut_inc   [N_IN],
  output logic                     sel_valid [N_OUT],
  output logic [$clog2(N_IN)-1:0]  sel       [N_OUT],
  output logic                     stalled   [N_IN]   // head held back by the in-order rule
);

  localparam int unsigned IW = $clog2(N_IN);

  logic          locked [N_OUT];
  logic [IW-1:0] owner  [N_OUT];
  logic [IW-1:0] ptr    [N_OUT];

  always_comb begin
    int i;
    i = 0;
    for (int n = 0; n < int'(N_IN); n++) begin
      pop[n]     = 1'b0;
      lut_inc[n] = 1'b0;
      stalled[n] = req_valid[n] && req_head[n] && !in_order[n];
    end
    for (int o = 0; o < int'(N_OUT); o++) begin
      sel_valid[o] = 1'b0;
      sel[o]       = '0;
      if (locked[o]) begin
        if (req_valid[owner[o]] && !req_head[owner[o]] && !out_full[o]) begin
          sel_valid[o]    = 1'b1;
          sel[o]          = owner[o];
          pop[owner[o]]   = 1'b1;
        end
      end else if (!out_full[o]) begin
        for (int k = 0; k < int'(N_IN); k++) begin
          i = (int'(ptr[o]) + k) % int'(N_IN);
          if (!sel_valid[o] && req_valid[i] && req_head[i] && in_order[i] &&
              int'(req_port[i]) == o) begin
            sel_valid[o] = 1'b1;
            sel[o]       = IW'(i);
            pop[i]       = 1'b1;
            lut_inc[i]   = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < int'(N_OUT); o++) begin
        locked[o] <= 1'b0;
        owner[o]  <= '0;
        ptr[o]    <= '0;
      end
    end else begin
      for (int o = 0; o < int'(N_OUT); o++) begin
        if (sel_valid[o]) begin
          if (req_tail[sel[o]]) begin
            locked[o] <= 1'b0;
          end else begin
            locked[o] <= 1'b1;
            owner[o]  <= sel[o];
          end
          if (!locked[o])
            ptr[o] <= (sel[o] == IW'(N_IN - 1)) ? '0 : sel[o] + 1'b1;
        end
      end
    end
  end

  // A head flit the in-order rule holds back is never popped.
  for (genvar i = 0; i < N_IN; i++) begin : g_chk
    a_no_stalled_pop: assert property (@(posedge clk) disable iff (!rst_n)
      pop[i] |-> !(stalled[i]));
  end

endmodule
