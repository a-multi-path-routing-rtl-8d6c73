// secded_enc: extended Hamming (single-error-correcting, double-error-
// detecting) encoder for one flit.
//
// The original scheme protects critical packets with a single-bit-correcting Hamming
// code at the receiving NI and relies on packet copies for multi-bit errors.
// This design adds the overall parity bit of the extended code so that the
// receiver can tell a double error from a single one and reject the copy
// instead of mis-correcting it.
//
// Data bit i sits at codeword position POS[i], the i-th integer >= 3 that is
// not a power of two. Check bit k (k < P) is the XOR of the data bits whose
// position has bit k set; ecc[P] is the XOR of all data and check bits.
// Purely combinational, no latency.
module secded_enc #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned P      = 7      // Hamming check bits, 2**P >= DATA_W+P+1
) (
  input  logic [DATA_W-1:0] data,
  output logic [P:0]        ecc
);

  // codeword position of every data bit: integers >= 3 that are not powers of two
  function automatic logic [DATA_W-1:0][P-1:0] positions();
    logic [DATA_W-1:0][P-1:0] r;
    int unsigned q;
    q = 3;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      if ((q & (q - 1)) == 0) q++;
      r[i] = P'(q);
      q++;
    end
    return r;
  endfunction

  localparam logic [DATA_W-1:0][P-1:0] POS = positions();

  // data bits covered by check bit k
  function automatic logic [P-1:0][DATA_W-1:0] masks();
    logic [P-1:0][DATA_W-1:0] m;
    for (int unsigned k = 0; k < P; k++)
      for (int unsigned i = 0; i < DATA_W; i++)
        m[k][i] = POS[i][k];
    return m;
  endfunction

  localparam logic [P-1:0][DATA_W-1:0] MASK = masks();

  always_comb begin
    logic [P-1:0] chk;
    for (int unsigned k = 0; k < P; k++) chk[k] = ^(data & MASK[k]);
    ecc = {(^data) ^ (^chk), chk};
  end

endmodule
