// ni_tx: source network interface of the multi-path NoC.
//
// The core hands over a packet as a stream of payload words (core_valid /
// core_ready, core_last on the final word) together with a local flow number
// and a critical flag. The NI holds a flow table written through the
// configuration port: for each flow the global commodity number, destination
// address, the number of copies n_t for critical packets, and up to MAX_PATHS
// source routes with their cumulative probability thresholds and enable bits.
//
// The packet is first stored (up to MAX_PAYLOAD words). It is then sent once,
// or n_t times if critical. Every transmitted packet gets the next identifier
// of its flow; the counter starts at 1 after reset, matching the look-up
// tables of the switches, and copies get identifiers of their own so that the
// in-order check at the re-convergent switch passes each of them in turn. The
// first copy takes the path chosen by path_selector; further copies take the
// next enabled paths in turn, so copies spread over the non-intersecting
// paths. The last copy is marked last_copy for the receiving NI.
// Every flit leaves with an extended Hamming check field (the route field of
// head flits excluded), one flit per cycle while credits remain.
//
// Per-flow identifiers, path choice from probabilities and packet replication
// follow the original scheme; the store-then-send order, the copy-to-path rotation,
// the table layout and all sizes are this design's choices.
// Configuration data layouts (cfg.node must equal my_addr):
//   CFG_NI_FLOW: data[5:0] commodity, data[13:6] destination, data[16:14] n_t
//   CFG_NI_PATH: data[29:0] route, data[38:30] threshold, data[39] enable
module ni_tx
  import noc_pkg::*;
#(
  parameter int unsigned N_FLOWS     = 8,
  parameter int unsigned MAX_PAYLOAD = 4,
  parameter int unsigned CREDITS     = 2,
  parameter logic [15:0] SEED        = 16'hACE1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [ADDR_W-1:0]          my_addr,
  input  cfg_t                       cfg,
  input  logic                       core_valid,
  output logic                       core_ready,
  input  logic [DATA_W-1:0]          core_data,
  input  logic [$clog2(N_FLOWS)-1:0] core_flow,
  input  logic                       core_critical,
  input  logic                       core_last,
  output logic                       out_valid,
  output flit_t                      out_flit,
  input  logic                       credit_in,
  output logic                       copy_event     // a replica (not the first copy) started
);

  localparam int unsigned FW = $clog2(N_FLOWS);
  localparam int unsigned LW = $clog2(MAX_PAYLOAD);
  localparam int unsigned JW = $clog2(MAX_PATHS);
  localparam int unsigned CW = $clog2(CREDITS + 1);

  typedef enum logic [1:0] {S_LOAD, S_HEAD, S_BODY} state_e;

  // flow table
  logic [COMM_W-1:0]  f_comm   [N_FLOWS];
  logic [ADDR_W-1:0]  f_dst    [N_FLOWS];
  logic [COPY_W-1:0]  f_copies [N_FLOWS];
  logic [ROUTE_W-1:0] f_route  [N_FLOWS][MAX_PATHS];
  logic [THR_W-1:0]   f_thr    [N_FLOWS][MAX_PATHS];
  logic [MAX_PATHS-1:0] f_en   [N_FLOWS];
  logic [PID_W-1:0]   f_pid    [N_FLOWS];

  state_e             state;
  logic [DATA_W-1:0]  buffer [MAX_PAYLOAD];
  logic [LW-1:0]      wr_idx, rd_idx, last_idx;
  logic [FW-1:0]      flow;
  logic               critical;
  logic [COPY_W-1:0]  copy, ncopies;
  logic [JW-1:0]      prev_path;
  logic [CW-1:0]      credits;

  logic [JW-1:0]      sel_path;
  logic               sel_ok;
  logic [JW-1:0]      path;
  logic               path_ok;
  logic               send_head, send_body;

  path_selector #(.N_PATHS(MAX_PATHS), .PW(PROB_W), .SEED(SEED)) u_sel (
    .clk, .rst_n,
    .thr    (f_thr[flow]),
    .path_en(f_en[flow]),
    .advance(send_head && copy == '0),
    .path   (sel_path),
    .path_ok(sel_ok)
  );

  // copies after the first take the next enabled path after the previous one
  always_comb begin
    path    = sel_path;
    path_ok = sel_ok;
    if (copy != '0) begin
      path_ok = 1'b0;
      for (int unsigned k = 1; k <= MAX_PATHS; k++) begin
        if (!path_ok && f_en[flow][JW'(int'(prev_path) + k)]) begin
          path    = JW'(int'(prev_path) + k);
          path_ok = 1'b1;
        end
      end
    end
  end

  assign core_ready = (state == S_LOAD);
  assign send_head  = (state == S_HEAD) && (credits != '0) && path_ok;
  assign send_body  = (state == S_BODY) && (credits != '0);

  head_t             hdr;
  logic [DATA_W-1:0] tx_data;
  logic [ECC_W-1:0]  tx_ecc;

  always_comb begin
    hdr.last_copy = (copy == ncopies - 1'b1);
    hdr.critical  = critical;
    hdr.comm      = f_comm[flow];
    hdr.pid       = f_pid[flow];
    hdr.src       = my_addr;
    hdr.dst       = f_dst[flow];
    hdr.route     = f_route[flow][path];
    tx_data       = send_head ? put_head(hdr) : buffer[rd_idx];
  end

  secded_enc #(.DATA_W(DATA_W), .P(ECC_W - 1)) u_enc (
    .data(ecc_view(send_head, tx_data)),
    .ecc (tx_ecc)
  );

  wire cfg_hit = cfg.we && (cfg.node == my_addr) && (int'(cfg.index) < int'(N_FLOWS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      wr_idx    <= '0;
      rd_idx    <= '0;
      last_idx  <= '0;
      flow      <= '0;
      critical  <= 1'b0;
      copy      <= '0;
      ncopies   <= COPY_W'(1);
      prev_path <= '0;
      credits   <= CW'(CREDITS);
      out_valid <= 1'b0;
      out_flit  <= '0;
      copy_event <= 1'b0;
      for (int f = 0; f < int'(N_FLOWS); f++) begin
        f_comm[f]   <= '0;
        f_dst[f]    <= '0;
        f_copies[f] <= COPY_W'(1);
        f_en[f]     <= '0;
        f_pid[f]    <= PID_W'(1);
        for (int j = 0; j < int'(MAX_PATHS); j++) begin
          f_route[f][j] <= '0;
          f_thr[f][j]   <= '0;
        end
      end
    end else begin
      out_valid  <= 1'b0;
      copy_event <= 1'b0;
      credits    <= credits + CW'(credit_in) - CW'(send_head || send_body);

      if (cfg_hit && cfg.kind == CFG_NI_FLOW) begin
        f_comm[cfg.index[FW-1:0]]   <= cfg.data[5:0];
        f_dst[cfg.index[FW-1:0]]    <= cfg.data[13:6];
        f_copies[cfg.index[FW-1:0]] <= cfg.data[16:14];
        f_pid[cfg.index[FW-1:0]]    <= PID_W'(1);
      end
      if (cfg_hit && cfg.kind == CFG_NI_PATH) begin
        f_route[cfg.index[FW-1:0]][cfg.path[JW-1:0]]  <= cfg.data[29:0];
        f_thr[cfg.index[FW-1:0]][cfg.path[JW-1:0]]    <= cfg.data[38:30];
        f_en[cfg.index[FW-1:0]][cfg.path[JW-1:0]]     <= cfg.data[39];
      end

      unique case (state)
        S_LOAD: begin
          if (core_valid) begin
            buffer[wr_idx] <= core_data;
            if (wr_idx == '0) begin
              flow     <= core_flow;
              critical <= core_critical;
              ncopies  <= (core_critical && f_copies[core_flow] != '0) ?
                          f_copies[core_flow] : COPY_W'(1);
            end
            if (core_last || wr_idx == LW'(MAX_PAYLOAD - 1)) begin
              last_idx <= wr_idx;
              wr_idx   <= '0;
              copy     <= '0;
              state    <= S_HEAD;
            end else begin
              wr_idx <= wr_idx + 1'b1;
            end
          end
        end
        S_HEAD: begin
          if (send_head) begin
            out_valid   <= 1'b1;
            out_flit    <= '{head: 1'b1, tail: 1'b0, ecc: tx_ecc, data: tx_data};
            f_pid[flow] <= f_pid[flow] + 1'b1;
            prev_path   <= path;
            rd_idx      <= '0;
            copy_event  <= (copy != '0);
            state       <= S_BODY;
          end
        end
        S_BODY: begin
          if (send_body) begin
            out_valid <= 1'b1;
            out_flit  <= '{head: 1'b0, tail: (rd_idx == last_idx), ecc: tx_ecc, data: tx_data};
            rd_idx    <= rd_idx + 1'b1;
            if (rd_idx == last_idx) begin
              if (copy == ncopies - 1'b1) begin
                state <= S_LOAD;
              end else begin
                copy  <= copy + 1'b1;
                state <= S_HEAD;
              end
            end
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
