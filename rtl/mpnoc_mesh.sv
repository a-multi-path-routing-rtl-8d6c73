// mpnoc_mesh: a COLS x ROWS mesh network on chip with multi-path routing,
// guaranteed in-order delivery and replication of critical packets.
//
// Every node holds one mp_switch, one source NI (ni_tx) and one receiving NI
// (ni_rx). Node n = y*COLS + x has address n. Switch port 0 is the local port
// to the NIs; ports 1..4 go north (y-1), east (x+1), south (y+1) and west
// (x-1). Links at the mesh edge are tied off. The default 4 x 3 size is the
// mesh the scheme was evaluated on.
//
// A source NI spreads the packets of a commodity over the commodity's
// non-intersecting source routes with programmed probabilities, numbering
// each transmitted packet. The switch where those paths meet again (normally
// the destination switch) has its re-order check enabled for the commodity
// and only passes the packet with the expected number, so the receiving NI
// gets the packets in order without a re-order buffer. Critical packets are
// sent n_t times; the receiving NI corrects single-bit errors, rejects copies
// with uncorrectable errors and keeps one good copy.
//
// Ports: cfg is a configuration write, one per cycle (see noc_pkg and
// ni_tx for the layouts). core_* injects packets at each node, rx_* delivers
// them. The *_event outputs pulse once per occurrence of each mechanism.
// inj_* is a test hook that models transient link errors: when inj_valid is
// high, inj_mask is XORed onto the {ecc, data} of the flit leaving switch
// inj_node through port inj_port in that cycle. Hop latency is 2 cycles plus
// one cycle of link, and each NI adds a store-and-forward of the packet.
module mpnoc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned COLS        = 4,
  parameter int unsigned ROWS        = 3,
  parameter int unsigned IN_DEPTH    = 2,
  parameter int unsigned OUT_DEPTH   = 4,
  parameter int unsigned N_FLOWS     = 8,
  parameter int unsigned MAX_PAYLOAD = 4,
  localparam int unsigned NN         = COLS * ROWS,
  localparam int unsigned FW         = $clog2(N_FLOWS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  cfg_t                      cfg,
  // packet injection, one interface per node
  input  logic                      core_valid    [NN],
  output logic                      core_ready    [NN],
  input  logic [DATA_W-1:0]         core_data     [NN],
  input  logic [FW-1:0]             core_flow     [NN],
  input  logic                      core_critical [NN],
  input  logic                      core_last     [NN],
  // packet delivery, one interface per node
  output logic                      rx_valid      [NN],
  input  logic                      rx_ready      [NN],
  output logic [DATA_W-1:0]         rx_data       [NN],
  output logic                      rx_last       [NN],
  output logic [ADDR_W-1:0]         rx_src        [NN],
  output logic [COMM_W-1:0]         rx_comm       [NN],
  output logic [PID_W-1:0]          rx_pid        [NN],
  output logic                      rx_critical   [NN],
  // mechanism events
  output logic                      stall_event     [NN],
  output logic                      copy_event      [NN],
  output logic                      corrected_event [NN],
  output logic                      error_event     [NN],
  output logic                      dup_event       [NN],
  output logic                      lost_event      [NN],
  // transient link error injection
  input  logic                      inj_valid,
  input  logic [7:0]                inj_node,
  input  logic [PORT_W-1:0]         inj_port,
  input  logic [ECC_W+DATA_W-1:0]   inj_mask
);

  logic  sw_in_valid  [NN][NPORTS];
  flit_t sw_in_flit   [NN][NPORTS];
  logic  sw_credit_o  [NN][NPORTS];
  logic  sw_out_valid [NN][NPORTS];
  flit_t sw_out_flit  [NN][NPORTS];
  logic  sw_credit_i  [NN][NPORTS];

  // flit leaving switch n through port p, with the injected error applied
  function automatic flit_t link_flit(flit_t f, int n, logic [PORT_W-1:0] p, logic iv, logic [7:0] in_n,
                                      logic [PORT_W-1:0] in_p, logic [ECC_W+DATA_W-1:0] m);
    flit_t r;
    r = f;
    if (iv && int'(in_n) == n && in_p == p) {r.ecc, r.data} = {f.ecc, f.data} ^ m;
    return r;
  endfunction

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int n = y * COLS + x;

      mp_switch #(
        .N(NPORTS), .IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .CREDITS(IN_DEPTH)
      ) u_sw (
        .clk, .rst_n,
        .in_valid   (sw_in_valid[n]),
        .in_flit    (sw_in_flit[n]),
        .credit_out (sw_credit_o[n]),
        .out_valid  (sw_out_valid[n]),
        .out_flit   (sw_out_flit[n]),
        .credit_in  (sw_credit_i[n]),
        .cfg_we     (cfg.we && cfg.kind == CFG_SW_REORDER && int'(cfg.node) == n),
        .cfg_comm   (cfg.index),
        .cfg_en     (cfg.data[0]),
        .stall_event(stall_event[n])
      );

      ni_tx #(
        .N_FLOWS(N_FLOWS), .MAX_PAYLOAD(MAX_PAYLOAD), .CREDITS(IN_DEPTH),
        .SEED(16'hACE1 ^ 16'(n * 16'h3B29))
      ) u_tx (
        .clk, .rst_n,
        .my_addr      (ADDR_W'(n)),
        .cfg,
        .core_valid   (core_valid[n]),
        .core_ready   (core_ready[n]),
        .core_data    (core_data[n]),
        .core_flow    (core_flow[n]),
        .core_critical(core_critical[n]),
        .core_last    (core_last[n]),
        .out_valid    (sw_in_valid[n][P_LOCAL]),
        .out_flit     (sw_in_flit[n][P_LOCAL]),
        .credit_in    (sw_credit_o[n][P_LOCAL]),
        .copy_event   (copy_event[n])
      );

      ni_rx #(.MAX_PAYLOAD(MAX_PAYLOAD), .DEPTH(IN_DEPTH), .N_COMM(NUM_COMM)) u_rx (
        .clk, .rst_n,
        .in_valid       (sw_out_valid[n][P_LOCAL]),
        .in_flit        (link_flit(sw_out_flit[n][P_LOCAL], n, P_LOCAL,
                                   inj_valid, inj_node, inj_port, inj_mask)),
        .credit_out     (sw_credit_i[n][P_LOCAL]),
        .out_valid      (rx_valid[n]),
        .out_ready      (rx_ready[n]),
        .out_data       (rx_data[n]),
        .out_last       (rx_last[n]),
        .out_src        (rx_src[n]),
        .out_comm       (rx_comm[n]),
        .out_pid        (rx_pid[n]),
        .out_critical   (rx_critical[n]),
        .corrected_event(corrected_event[n]),
        .error_event    (error_event[n]),
        .dup_event      (dup_event[n]),
        .lost_event     (lost_event[n])
      );

      // north neighbour (y-1): our port 1 <-> its port 3
      if (y > 0) begin : g_n
        localparam int m = (y - 1) * COLS + x;
        assign sw_in_valid[n][P_NORTH] = sw_out_valid[m][P_SOUTH];
        assign sw_in_flit[n][P_NORTH]  = link_flit(sw_out_flit[m][P_SOUTH], m, P_SOUTH,
                                                   inj_valid, inj_node, inj_port, inj_mask);
        assign sw_credit_i[n][P_NORTH] = sw_credit_o[m][P_SOUTH];
      end else begin : g_n_edge
        assign sw_in_valid[n][P_NORTH] = 1'b0;
        assign sw_in_flit[n][P_NORTH]  = '0;
        assign sw_credit_i[n][P_NORTH] = 1'b0;
      end
      // south neighbour (y+1)
      if (y < ROWS - 1) begin : g_s
        localparam int m = (y + 1) * COLS + x;
        assign sw_in_valid[n][P_SOUTH] = sw_out_valid[m][P_NORTH];
        assign sw_in_flit[n][P_SOUTH]  = link_flit(sw_out_flit[m][P_NORTH], m, P_NORTH,
                                                   inj_valid, inj_node, inj_port, inj_mask);
        assign sw_credit_i[n][P_SOUTH] = sw_credit_o[m][P_NORTH];
      end else begin : g_s_edge
        assign sw_in_valid[n][P_SOUTH] = 1'b0;
        assign sw_in_flit[n][P_SOUTH]  = '0;
        assign sw_credit_i[n][P_SOUTH] = 1'b0;
      end
      // east neighbour (x+1)
      if (x < COLS - 1) begin : g_e
        localparam int m = y * COLS + x + 1;
        assign sw_in_valid[n][P_EAST] = sw_out_valid[m][P_WEST];
        assign sw_in_flit[n][P_EAST]  = link_flit(sw_out_flit[m][P_WEST], m, P_WEST,
                                                  inj_valid, inj_node, inj_port, inj_mask);
        assign sw_credit_i[n][P_EAST] = sw_credit_o[m][P_WEST];
      end else begin : g_e_edge
        assign sw_in_valid[n][P_EAST] = 1'b0;
        assign sw_in_flit[n][P_EAST]  = '0;
        assign sw_credit_i[n][P_EAST] = 1'b0;
      end
      // west neighbour (x-1)
      if (x > 0) begin : g_w
        localparam int m = y * COLS + x - 1;
        assign sw_in_valid[n][P_WEST] = sw_out_valid[m][P_EAST];
        assign sw_in_flit[n][P_WEST]  = link_flit(sw_out_flit[m][P_EAST], m, P_EAST,
                                                  inj_valid, inj_node, inj_port, inj_mask);
        assign sw_credit_i[n][P_WEST] = sw_credit_o[m][P_EAST];
      end else begin : g_w_edge
        assign sw_in_valid[n][P_WEST] = 1'b0;
        assign sw_in_flit[n][P_WEST]  = '0;
        assign sw_credit_i[n][P_WEST] = 1'b0;
      end
    end
  end

endmodule
