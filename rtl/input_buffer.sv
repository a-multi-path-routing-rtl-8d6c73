// input_buffer: flit FIFO at one switch (or NI) input, the "input buffers" of
// the re-convergent switch.
//
// Flits arrive from the link with in_valid; the upstream sender only sends
// while it holds a credit, so the FIFO never overflows (an assertion checks
// this). Each flit popped by the switch (out_pop) returns one credit to the
// upstream sender through credit_out in the same cycle. An out-of-order head
// flit that the arbiter refuses simply stays at the front, which is how the
// original scheme stalls out-of-order packets. The depth default of 2 follows the
// two-slot input buffers drawn in the reference switch diagram; the scheme gives no
// number. A flit written in cycle t is visible at the output in cycle t+1.
module input_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  credit_out,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_pop
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t               mem [DEPTH];
  logic [AW-1:0]       rd_ptr, wr_ptr;
  localparam int unsigned NW = $clog2(DEPTH + 1);
  logic [NW-1:0]       count;

  wire do_pop = out_pop && (count != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (in_valid) begin
        mem[wr_ptr] <= in_flit;
        wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + NW'(in_valid) - NW'(do_pop);
    end
  end

  assign out_valid  = (count != 0);
  assign out_flit   = mem[rd_ptr];
  assign credit_out = do_pop;

  // The credit protocol must never let the sender overrun the buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (int'(count) < DEPTH) || do_pop);

endmodule
