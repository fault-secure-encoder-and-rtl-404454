// fs_detector: fault-secure detector (code checker) of the (15,7,5) EG-LDPC
// code.
//
// It forms the syndrome S = C x H^T with one 4-input XOR per row of the
// 15 x 15 cyclic parity-check matrix H, and raises error when any syndrome
// bit is 1. Because H has more rows (15) than its rank (8), the checker has
// redundant syndrome bits: for this code any combination of up to
// d_min - 1 = 4 errors spread over the checked word and the checker's own
// gates yields a non-zero syndrome, so no extra checking logic is needed.
// Each syndrome bit has its own gate; none is shared.
//
// Interface: codeword (15 bits) in; syndrome (15 bits) and error out.
// Purely combinational. The syndrome computation and OR follow the document;
// the particular line that forms H was derived from the document's code.
module fs_detector
  import eg_ldpc_pkg::*;
(
  input  codeword_t codeword,
  output syndrome_t syndrome,
  output logic      error
);

  for (genvar r = 0; r < N; r++) begin : g_row
    localparam codeword_t ROW = h_row(r);
    assign syndrome[r] = ^(codeword & ROW);
  end

  assign error = |syndrome;

  // every row of H must have weight RHO
  if ($countones(H_LINE) != RHO) begin : g_bad_line
    $error("H_LINE must have RHO ones");
  end

endmodule
