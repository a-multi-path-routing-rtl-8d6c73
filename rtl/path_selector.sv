// path_selector: run-time choice of one of a commodity's paths according to
// the path probabilities found at design time.
//
// The original scheme splits each commodity's traffic over its non-intersecting
// paths with a linear program and then picks, for every packet, a path with
// the resulting probabilities. Here the probabilities are given as cumulative
// thresholds in steps of 1/2**PROB_W: path j is taken when the current random
// number r (the low PROB_W bits of a Galois LFSR) satisfies
// thr[j-1] <= r < thr[j]; thr of the last used path should be 2**PROB_W.
// A path whose enable bit is cleared (a permanently failed path) is skipped
// and the next enabled path, cyclically, is taken instead. The LFSR, the
// threshold encoding and the skipping rule are this design's choices.
//
// path/path_ok are combinational from the current LFSR state; `advance`
// steps the LFSR at the clock edge, once per packet.
module path_selector
  import noc_pkg::*;
#(
  parameter int unsigned N_PATHS = MAX_PATHS,
  parameter int unsigned PW      = PROB_W,
  parameter logic [15:0] SEED    = 16'hACE1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [PW:0]                thr [N_PATHS],
  input  logic [N_PATHS-1:0]         path_en,
  input  logic                       advance,
  output logic [$clog2(N_PATHS)-1:0] path,
  output logic                       path_ok
);

  localparam int unsigned JW = $clog2(N_PATHS);

  logic [15:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lfsr <= (SEED == '0) ? 16'h1 : SEED;
    else if (advance) lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
  end

  always_comb begin
    int unsigned j0;
    logic        found;
    logic [PW:0] r;
    r     = {1'b0, lfsr[PW-1:0]};
    j0    = N_PATHS - 1;
    found = 1'b0;
    for (int unsigned j = 0; j < N_PATHS; j++) begin
      if (!found && r < thr[j]) begin
        j0    = j;
        found = 1'b1;
      end
    end
    path    = JW'(j0);
    path_ok = 1'b0;
    for (int unsigned k = 0; k < N_PATHS; k++) begin
      int unsigned j;
      j = (j0 + k) % N_PATHS;
      if (!path_ok && path_en[j]) begin
        path    = JW'(j);
        path_ok = 1'b1;
      end
    end
  end

endmodule
