// tb_reorder_lut: enables the check for a few commodities and compares the
// table against a scoreboard: entries start at 1, only the expected
// identifier is in order, an increment advances it by one (with wrap-around),
// disabled commodities are always in order and are never advanced.
module tb_reorder_lut;
  import noc_pkg::*;

  localparam int NC = 16, NL = 3;
  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_en;
  logic [3:0] cfg_comm;
  logic [3:0] lk_comm [NL];
  logic [7:0] lk_pid [NL];
  logic in_order [NL];
  logic inc [NL];
  logic [3:0] inc_comm [NL];
  int checks = 0, failures = 0;
  logic [7:0] model [NC];
  logic       en [NC];

  reorder_lut #(.N_COMM(NC), .N_LOOK(NL), .ID_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_en = 0; cfg_comm = 0;
    for (int p = 0; p < NL; p++) begin lk_comm[p] = 0; lk_pid[p] = 0; inc[p] = 0; inc_comm[p] = 0; end
    for (int c = 0; c < NC; c++) begin model[c] = 1; en[c] = (c % 3 == 0); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) if (en[c]) begin
      @(negedge clk); cfg_we = 1; cfg_comm = 4'(c); cfg_en = 1;
      @(posedge clk);
    end
    @(negedge clk); cfg_we = 0;
    repeat (3000) begin
      @(negedge clk);
      for (int p = 0; p < NL; p++) begin
        lk_comm[p] = 4'(p * 5 + $urandom_range(4));
        lk_pid[p]  = ($urandom_range(1) == 1) ? model[lk_comm[p]] : 8'($urandom);
        inc[p] = 0; inc_comm[p] = lk_comm[p];
      end
      #1;
      for (int p = 0; p < NL; p++) begin
        logic exp;
        exp = !en[lk_comm[p]] || (lk_pid[p] == model[lk_comm[p]]);
        checks++;
        if (in_order[p] !== exp) begin
          failures++; $display("FAIL port %0d comm %0d pid %0d exp %0d", p, lk_comm[p], lk_pid[p], model[lk_comm[p]]);
        end
        // grant in-order heads, as the arbiter would
        if (exp && $urandom_range(1) == 1) inc[p] = 1;
      end
      @(posedge clk);
      for (int p = 0; p < NL; p++) if (inc[p] && en[inc_comm[p]]) model[inc_comm[p]] = model[inc_comm[p]] + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
