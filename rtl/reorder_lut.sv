// reorder_lut: the re-order look-up table of a re-convergent switch.
//
// One entry per commodity holds the identifier of the next packet the switch
// may pass for that commodity. As in the original scheme, every entry is 1 after
// reset, a head flit whose identifier equals its entry is in order, and the
// entry is incremented by 1 when such a packet is granted. Identifiers are
// PID_W bits wide and wrap around.
//
// The check is only needed where the paths of a commodity meet again, so each
// entry also has an enable bit, written through the configuration port (off
// after reset); where it is off every packet of that commodity counts as in
// order and the entry is left alone. This enable is this design's addition.
//
// N_LOOK read ports (one per switch input) compare a head flit's commodity and
// identifier combinationally and report in_order. The same number of
// increment ports update entries at the clock edge; the arbiter never grants
// two packets of one commodity in the same cycle, because only one of them
// can carry the expected identifier.
module reorder_lut
  import noc_pkg::*;
#(
  parameter int unsigned N_COMM = NUM_COMM,
  parameter int unsigned N_LOOK = NPORTS,
  parameter int unsigned ID_W   = PID_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [$clog2(N_COMM)-1:0] cfg_comm,
  input  logic                      cfg_en,
  input  logic [$clog2(N_COMM)-1:0] lk_comm [N_LOOK],
  input  logic [ID_W-1:0]           lk_pid [N_LOOK],
  output logic                      in_order [N_LOOK],
  input  logic                      inc [N_LOOK],
  input  logic [$clog2(N_COMM)-1:0] inc_comm [N_LOOK]
);

  logic [ID_W-1:0] expected [N_COMM];
  logic            enable   [N_COMM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(N_COMM); c++) begin
        expected[c] <= ID_W'(1);
        enable[c]   <= 1'b0;
      end
    end else begin
      for (int p = 0; p < int'(N_LOOK); p++) begin
        if (inc[p] && enable[inc_comm[p]])
          expected[inc_comm[p]] <= expected[inc_comm[p]] + 1'b1;
      end
      if (cfg_we) begin
        enable[cfg_comm]   <= cfg_en;
        expected[cfg_comm] <= ID_W'(1);
      end
    end
  end

  always_comb begin
    for (int p = 0; p < int'(N_LOOK); p++)
      in_order[p] = !enable[lk_comm[p]] || (expected[lk_comm[p]] == lk_pid[p]);
  end

endmodule
