// tb_secded_dec: encodes random words with the reference code, flips zero,
// one or two bits of the 72-bit codeword and checks that the decoder passes,
// corrects or flags the word.
module tb_secded_dec;
  import noc_pkg::*;
  import ecc_ref_pkg::*;

  logic [DATA_W-1:0] data_in, data_out;
  logic [ECC_W-1:0]  ecc_in;
  logic              corrected, uncorrectable;
  int checks = 0, failures = 0;

  secded_dec #(.DATA_W(DATA_W), .P(ECC_W - 1)) dut (.*);

  task automatic check(string what, logic [DATA_W-1:0] exp_d, logic exp_c, logic exp_u, logic cmp_data);
    checks++;
    if ((cmp_data && data_out !== exp_d) || corrected !== exp_c || uncorrectable !== exp_u) begin
      failures++;
      $display("FAIL %s: out=%h exp=%h c=%b u=%b", what, data_out, exp_d, corrected, uncorrectable);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] d;
    logic [ECC_W+DATA_W-1:0] cw;
    int a, b;
    repeat (500) begin
      d = {$urandom, $urandom};
      cw = {ref_ecc(d), d};
      {ecc_in, data_in} = cw;
      #1 check("clean", d, 1'b0, 1'b0, 1'b1);
      a = $urandom_range(ECC_W + DATA_W - 1);
      {ecc_in, data_in} = cw ^ ((ECC_W+DATA_W)'(1) << a);
      #1 check("single", d, 1'b1, 1'b0, 1'b1);
      b = $urandom_range(ECC_W + DATA_W - 1);
      if (b == a) b = (a + 1) % (ECC_W + DATA_W);
      {ecc_in, data_in} = cw ^ ((ECC_W+DATA_W)'(1) << a) ^ ((ECC_W+DATA_W)'(1) << b);
      #1 check("double", d, 1'b0, 1'b1, 1'b0);
    end
    // every single-bit position once
    d = 64'hDEAD_BEEF_0123_4567;
    cw = {ref_ecc(d), d};
    for (int p = 0; p < ECC_W + DATA_W; p++) begin
      {ecc_in, data_in} = cw ^ ((ECC_W+DATA_W)'(1) << p);
      #1 check("each", d, 1'b1, 1'b0, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
