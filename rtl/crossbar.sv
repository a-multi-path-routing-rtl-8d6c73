// crossbar: the switch's N_IN x N_OUT flit crossbar.
//
// For every output the arbiter supplies a valid bit and the number of the
// input it connects; the output then carries that input's flit. A head flit
// leaving through the crossbar has its source route advanced by one hop (the
// 3-bit port number that selected this output is shifted out), so the next
// switch finds its own port in the low bits. Combinational.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned N_IN  = 5,
  parameter int unsigned N_OUT = 5
) (
  input  flit_t                      in_flit [N_IN],
  input  logic                       sel_valid [N_OUT],
  input  logic [$clog2(N_IN)-1:0]    sel [N_OUT],
  output logic                       out_valid [N_OUT],
  output flit_t                      out_flit [N_OUT]
);

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      flit_t f;
      f = in_flit[sel[o]];
      if (f.head) f.data[ROUTE_W-1:0] = f.data[ROUTE_W-1:0] >> PORT_W;
      out_valid[o] = sel_valid[o];
      out_flit[o]  = f;
    end
  end

endmodule
