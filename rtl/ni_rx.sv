// ni_rx: receiving network interface of the multi-path NoC.
//
// Flits arrive from the local output of the destination switch into an
// input_buffer (credit flow control). The re-convergent switch has already put
// the packets of each commodity back in order, so no re-order buffer is
// needed here. Every flit goes through the extended Hamming decoder: a single
// bit error is corrected, a double error marks the whole packet as bad. The
// packet is collected (head plus up to MAX_PAYLOAD words) and then judged:
//
//   - a packet is accepted if it is error free (after correction) and no
//     earlier copy of the same packet has been accepted;
//   - copies of a critical packet arrive one after another with consecutive
//     identifiers, the last one marked last_copy; one state bit per commodity
//     remembers that a copy of the current group was already accepted, so the
//     other copies are dropped (dup_event), and it is cleared by the last copy;
//   - if the last copy of a group (or a non-critical packet) is bad and
//     nothing of its group was accepted, the packet is lost (lost_event).
//
// Accepted packets are handed to the core as payload words (out_valid /
// out_ready, out_last) with the header fields alongside. Error correction at
// the receiving NI and acceptance of one error-free copy follow the original scheme;
// the double-error detection bit, the group marking and the store-then-judge
// order are this design's choices. A packet is judged one cycle after its
// tail flit is read from the input buffer and delivered from the next cycle.
module ni_rx
  import noc_pkg::*;
#(
  parameter int unsigned MAX_PAYLOAD = 4,
  parameter int unsigned DEPTH       = 2,
  parameter int unsigned N_COMM      = NUM_COMM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              credit_out,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last,
  output logic [ADDR_W-1:0] out_src,
  output logic [COMM_W-1:0] out_comm,
  output logic [PID_W-1:0]  out_pid,
  output logic              out_critical,
  output logic              corrected_event,  // a flit had a single-bit error corrected
  output logic              error_event,      // a flit had an uncorrectable error
  output logic              dup_event,        // a redundant copy was dropped
  output logic              lost_event        // a packet arrived with no usable copy
);

  localparam int unsigned LW = $clog2(MAX_PAYLOAD);

  typedef enum logic [1:0] {S_RECV, S_JUDGE, S_DELIVER} state_e;

  logic              q_valid;
  flit_t             q_flit;
  logic              pop;
  logic [DATA_W-1:0] dec_data;
  logic              dec_corr, dec_unc;

  input_buffer #(.DEPTH(DEPTH)) u_ib (
    .clk, .rst_n,
    .in_valid, .in_flit, .credit_out,
    .out_valid(q_valid),
    .out_flit (q_flit),
    .out_pop  (pop)
  );

  secded_dec #(.DATA_W(DATA_W), .P(ECC_W - 1)) u_dec (
    .data_in      (ecc_view(q_flit.head, q_flit.data)),
    .ecc_in       (q_flit.ecc),
    .data_out     (dec_data),
    .corrected    (dec_corr),
    .uncorrectable(dec_unc)
  );

  state_e            state;
  head_t             hdr;
  logic              bad;
  logic [DATA_W-1:0] payload [MAX_PAYLOAD];
  logic [LW-1:0]     wr_idx, rd_idx, last_idx;
  logic              got [N_COMM];

  assign pop = (state == S_RECV) && q_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_RECV;
      hdr      <= '0;
      bad      <= 1'b0;
      wr_idx   <= '0;
      rd_idx   <= '0;
      last_idx <= '0;
      for (int c = 0; c < int'(N_COMM); c++) got[c] <= 1'b0;
      corrected_event <= 1'b0;
      error_event     <= 1'b0;
      dup_event       <= 1'b0;
      lost_event      <= 1'b0;
    end else begin
      corrected_event <= pop && dec_corr;
      error_event     <= pop && dec_unc;
      dup_event       <= 1'b0;
      lost_event      <= 1'b0;
      unique case (state)
        S_RECV: begin
          if (pop) begin
            if (q_flit.head) begin
              hdr    <= get_head(dec_data);
              bad    <= dec_unc;
              wr_idx <= '0;
            end else begin
              payload[wr_idx] <= dec_data;
              bad             <= bad || dec_unc;
              wr_idx          <= wr_idx + 1'b1;
              if (q_flit.tail) begin
                last_idx <= wr_idx;
                state    <= S_JUDGE;
              end
            end
          end
        end
        S_JUDGE: begin
          rd_idx <= '0;
          if (!bad && !got[hdr.comm]) begin
            state <= S_DELIVER;
          end else begin
            state      <= S_RECV;
            dup_event  <= !bad && got[hdr.comm];
            lost_event <= bad && hdr.last_copy && !got[hdr.comm];
          end
          if (hdr.last_copy)  got[hdr.comm] <= 1'b0;
          else if (!bad)      got[hdr.comm] <= 1'b1;
        end
        S_DELIVER: begin
          if (out_ready) begin
            rd_idx <= rd_idx + 1'b1;
            if (rd_idx == last_idx) state <= S_RECV;
          end
        end
        default: state <= S_RECV;
      endcase
    end
  end

  assign out_valid    = (state == S_DELIVER);
  assign out_data     = payload[rd_idx];
  assign out_last     = (rd_idx == last_idx);
  assign out_src      = hdr.src;
  assign out_comm     = hdr.comm;
  assign out_pid      = hdr.pid;
  assign out_critical = hdr.critical;

endmodule
