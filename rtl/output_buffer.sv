// output_buffer: flit FIFO at one switch output, with the sender side of
// credit-based link flow control.
//
// The crossbar writes at most one flit per cycle (in_push, allowed while
// `full` is low). Whenever the FIFO holds a flit and the credit counter is
// non-zero, the front flit is driven onto the link for one cycle (link_valid)
// and one credit is spent. The receiver returns a credit (credit_in) for each
// flit it frees. The counter starts at CREDITS, the depth of the downstream
// input buffer. A pushed flit can leave at the earliest in the next cycle.
// The depth default of 4 follows the four-slot output buffers drawn in the
// reference switch diagram; credit-based flow control is one of the two schemes the
// original scheme names, and the choice between them is this design's.
module output_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH   = 4,
  parameter int unsigned CREDITS = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_push,
  input  flit_t in_flit,
  output logic  full,
  output logic  link_valid,
  output flit_t link_flit,
  input  logic  credit_in
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(CREDITS + 1);

  flit_t                      mem [DEPTH];
  logic [AW-1:0]              rd_ptr, wr_ptr;
  localparam int unsigned NW = $clog2(DEPTH + 1);
  logic [NW-1:0]              count;
  logic [CW-1:0]              credits;

  wire send = (count != 0) && (credits != 0);
  wire push = in_push && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr  <= '0;
      wr_ptr  <= '0;
      count   <= '0;
      credits <= CW'(CREDITS);
    end else begin
      if (push) begin
        mem[wr_ptr] <= in_flit;
        wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (send) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count   <= count + NW'(push) - NW'(send);
      credits <= credits + CW'(credit_in) - CW'(send);
    end
  end

  assign full       = (int'(count) == DEPTH);
  assign link_valid = send;
  assign link_flit  = mem[rd_ptr];

  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    credit_in |-> int'(credits) < CREDITS || send);

endmodule
