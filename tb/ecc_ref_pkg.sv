// ecc_ref_pkg: reference model of the extended Hamming code used by the
// testbenches. It builds the codeword explicitly (data bits at every position
// >= 3 that is not a power of two, check bit k at position 2**k) and derives
// the check bits from it, independently of the RTL encoder.
package ecc_ref_pkg;
  import noc_pkg::*;

  function automatic logic [ECC_W-1:0] ref_ecc(logic [DATA_W-1:0] d);
    logic [127:0] cw;
    logic [ECC_W-2:0] chk;
    int unsigned q, i;
    cw = '0;
    q = 1;
    i = 0;
    while (i < DATA_W) begin
      if ((q & (q - 1)) != 0) begin
        cw[q] = d[i];
        i++;
      end
      q++;
    end
    for (int k = 0; k < ECC_W - 1; k++) begin
      chk[k] = 1'b0;
      for (int p = 1; p < 128; p++)
        if (((p >> k) & 1) == 1) chk[k] ^= cw[p];
    end
    return {(^d) ^ (^chk), chk};
  endfunction

  // encoded flit as the source NI builds it
  function automatic flit_t ref_flit(logic head, logic tail, logic [DATA_W-1:0] d);
    flit_t f;
    f.head = head;
    f.tail = tail;
    f.data = d;
    f.ecc  = ref_ecc(ecc_view(head, d));
    return f;
  endfunction
endpackage
