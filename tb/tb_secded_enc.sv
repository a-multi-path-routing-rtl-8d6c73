// tb_secded_enc: checks the SEC-DED encoder against the reference code built
// in ecc_ref_pkg, for fixed and random data words.
module tb_secded_enc;
  import noc_pkg::*;
  import ecc_ref_pkg::*;

  logic [DATA_W-1:0] data;
  logic [ECC_W-1:0]  ecc;
  int checks = 0, failures = 0;

  secded_enc #(.DATA_W(DATA_W), .P(ECC_W - 1)) dut (.data, .ecc);

  task automatic check(logic [ECC_W-1:0] exp);
    checks++;
    if (ecc !== exp) begin
      failures++;
      $display("FAIL data=%h ecc=%h exp=%h", data, ecc, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = '0;               #1 check(8'h00);
    data = 64'h1;            #1 check(8'h83);   // position 3 -> check bits 0,1 and parity
    for (int i = 0; i < DATA_W; i++) begin
      data = 64'h1 << i;     #1 check(ref_ecc(data));
    end
    repeat (2000) begin
      data = {$urandom, $urandom};
      #1 check(ref_ecc(data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
