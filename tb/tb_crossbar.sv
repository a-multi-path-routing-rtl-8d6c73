// tb_crossbar: random selections; each output must carry the selected input's
// flit, with the route of a head flit shifted by one hop.
module tb_crossbar;
  import noc_pkg::*;

  localparam int N = 5;
  flit_t in_flit [N];
  logic  sel_valid [N];
  logic [$clog2(N)-1:0] sel [N];
  logic  out_valid [N];
  flit_t out_flit [N];
  int checks = 0, failures = 0;

  crossbar #(.N_IN(N), .N_OUT(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t e;
    repeat (500) begin
      for (int i = 0; i < N; i++) begin
        in_flit[i].data = {$urandom, $urandom};
        in_flit[i].ecc  = 8'($urandom);
        in_flit[i].head = 1'($urandom);
        in_flit[i].tail = 1'($urandom);
      end
      for (int o = 0; o < N; o++) begin
        sel[o] = 3'($urandom_range(N - 1));
        sel_valid[o] = 1'($urandom);
      end
      #1;
      for (int o = 0; o < N; o++) begin
        e = in_flit[sel[o]];
        if (e.head) e.data[ROUTE_W-1:0] = {3'b000, e.data[ROUTE_W-1:3]};
        checks++;
        if (out_flit[o] !== e || out_valid[o] !== sel_valid[o]) begin
          failures++; $display("FAIL out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
