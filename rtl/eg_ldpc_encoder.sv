// eg_ldpc_encoder: systematic encoder of the (15,7,5) EG-LDPC code.
//
// The information vector is copied to codeword bits c[6:0]; each parity bit
// c[7+j] is the XOR of the information bits selected by column j of the
// parity part X of the systematic generator matrix G = [I : X], i.e. the
// inner product of the information vector with that column. Every parity bit
// has its own XOR tree and no gate is shared between two codeword bits, so a
// single transient fault inside the encoder can corrupt at most one codeword
// digit, which the fault-secure detector on the output then sees.
//
// Interface: info (7 bits) in, codeword (15 bits) out. Purely combinational.
// The generator matrix follows the document's parity equations; the bit
// order c = [info : parity] is the one the document describes.
module eg_ldpc_encoder
  import eg_ldpc_pkg::*;
(
  input  info_t     info,
  output codeword_t codeword
);

  assign codeword[K-1:0] = info;

  for (genvar j = 0; j < R; j++) begin : g_parity
    localparam info_t MASK = parity_mask(j);
    assign codeword[K+j] = ^(info & MASK);
  end

endmodule
