// ldpc_ref_pkg: reference model of the (15,7,5) EG-LDPC code for the
// testbenches, written independently of the RTL: the encoder uses the
// parity equations written out bit by bit, the checker lists the 15 lines
// of H as point sets, and the decoder searches all 128 codewords for the
// nearest one.
package ldpc_ref_pkg;

  function automatic logic [14:0] ref_encode(input logic [6:0] m);
    logic [7:0] p;
    p[0] = m[0] ^ m[4] ^ m[6];
    p[1] = m[0] ^ m[1] ^ m[4] ^ m[5] ^ m[6];
    p[2] = m[0] ^ m[1] ^ m[2] ^ m[4] ^ m[5];
    p[3] = m[1] ^ m[2] ^ m[3] ^ m[5] ^ m[6];
    p[4] = m[0] ^ m[2] ^ m[3];
    p[5] = m[1] ^ m[3] ^ m[4];
    p[6] = m[2] ^ m[4] ^ m[5];
    p[7] = m[3] ^ m[5] ^ m[6];
    return {p, m};
  endfunction

  // syndrome bit r checks the points (r + {0,4,6,7}) mod 15
  function automatic logic [14:0] ref_syndrome(input logic [14:0] c);
    logic [14:0] s;
    for (int r = 0; r < 15; r++)
      s[r] = c[r % 15] ^ c[(r + 4) % 15] ^ c[(r + 6) % 15] ^ c[(r + 7) % 15];
    return s;
  endfunction

  // nearest-codeword decoding by exhaustive search
  function automatic logic [14:0] ref_decode(input logic [14:0] c);
    logic [14:0] best;
    int bestd;
    best  = '0;
    bestd = 99;
    for (int m = 0; m < 128; m++) begin
      logic [14:0] cw;
      cw = ref_encode(7'(m));
      if ($countones(cw ^ c) < bestd) begin
        bestd = $countones(cw ^ c);
        best  = cw;
      end
    end
    return best;
  endfunction

endpackage
