// mlg_corrector: one-step majority-logic corrector of the (15,7,5) EG-LDPC
// code; corrects up to two bit errors in a codeword read from memory.
//
// For every bit position i the four rows of H that contain i are parity
// checks orthogonal on i: bit i appears in all four, and every other bit in
// at most one. If bit i is wrong (and at most one other bit is), at least
// three of the four check sums are 1; if bit i is right (and at most two
// other bits are wrong), at most two are. Bit i is therefore inverted when
// at least THRESH = 3 of its check sums are 1.
//
// Each output bit is produced by its own check-sum XORs and its own majority
// gate, with nothing shared between bits, so a single fault inside the
// corrector corrupts at most one output digit; the fault-secure detector on
// the output catches it and the controller repeats the correction.
//
// Interface: codeword_in (15 bits) in, codeword_out (15 bits) out. Purely
// combinational. The document states only that the corrector corrects the
// stored words; majority-logic decoding and the threshold are this design's
// choice.
module mlg_corrector
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned THRESH = GAMMA/2 + 1
) (
  input  codeword_t codeword_in,
  output codeword_t codeword_out
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic [GAMMA-1:0] checks;

    // the GAMMA rows of H containing bit i are rows (i - p) mod N, for every
    // point p of the line
    for (genvar q = 0; q < GAMMA; q++) begin : g_chk
      localparam int unsigned P   = nth_point(q);
      localparam int unsigned ROW = (i + N - P) % N;
      localparam codeword_t   H   = h_row(ROW);
      assign checks[q] = ^(codeword_in & H);
    end

    int unsigned votes;
    always_comb begin
      votes = '0;
      for (int q = 0; q < GAMMA; q++) votes += checks[q];
    end

    assign codeword_out[i] = codeword_in[i] ^ (votes >= THRESH);
  end

  // position of the q-th point (q = 0..GAMMA-1) of the line H_LINE
  function automatic int unsigned nth_point(input int unsigned q);
    int unsigned cnt;
    nth_point = 0;
    cnt = 0;
    for (int unsigned b = 0; b < N; b++) begin
      if (H_LINE[b]) begin
        if (cnt == q) nth_point = b;
        cnt++;
      end
    end
  endfunction

endmodule
