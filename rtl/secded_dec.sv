// secded_dec: extended Hamming decoder for one flit, the error detection and
// correction circuit of the receiving NI.
//
// It recomputes the P Hamming check bits over the received data, forms the
// syndrome and checks the overall parity:
//   syndrome 0, parity ok         -> no error
//   parity wrong                  -> single error, corrected (if it hit a
//                                    data bit the bit at position syndrome is
//                                    flipped back), `corrected` is raised
//   syndrome != 0, parity ok      -> two (or an even number of) errors,
//                                    `uncorrectable` is raised
// A syndrome naming a position outside the codeword is also reported as
// uncorrectable. The code layout matches secded_enc. Combinational.
module secded_dec #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned P      = 7
) (
  input  logic [DATA_W-1:0] data_in,
  input  logic [P:0]        ecc_in,
  output logic [DATA_W-1:0] data_out,
  output logic              corrected,
  output logic              uncorrectable
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

  logic [P-1:0]      syn;
  logic              par_err;
  logic [DATA_W-1:0] flip;

  always_comb begin
    for (int unsigned k = 0; k < P; k++) syn[k] = ecc_in[k] ^ (^(data_in & MASK[k]));
    par_err = (^data_in) ^ (^ecc_in);
    for (int unsigned i = 0; i < DATA_W; i++) flip[i] = par_err && (syn == POS[i]);
    data_out = data_in ^ flip;
    // parity wrong: one error, in a data bit (flip), a check bit (syndrome a
    // power of two) or the parity bit (syndrome 0); anything else is beyond
    // the code's reach
    corrected     = par_err && ((flip != '0) || ((syn & (syn - 1'b1)) == '0));
    uncorrectable = (!par_err && syn != '0) || (par_err && !corrected);
  end

endmodule
