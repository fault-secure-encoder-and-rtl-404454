// eg_ldpc_pkg: constants, types and constant functions of the (15,7,5)
// type-I two-dimensional Euclidean Geometry LDPC code (t = 2) used by the
// fault-tolerant memory system.
//
// Codeword layout: c[6:0] carry the information bits i0..i6 unchanged
// (systematic code), c[14:7] carry the parity bits p0..p7.
//
// Generator: the code is cyclic with generator polynomial
//   g(x) = 1 + x + x^2 + x^4 + x^8
// and parity bit p_j of information bit i_m is bit j of x^(8+m) mod g(x).
// This reproduces the parity equations p0 = i0^i4^i6, p1 = i0^i1^i4^i5^i6,
// ..., p7 = i3^i5^i6 (22 two-input XORs in all).
//
// Parity-check matrix H (15 x 15): row r is the incidence vector of one line
// of EG(2,2^2), here the points {0,4,6,7}, rotated left by r positions.
// Every row and every column has weight 4, and two rows share at most one
// position, so the four rows that contain a given bit are orthogonal on it.
// The line was chosen as the only weight-4 vector whose cyclic shifts are
// all orthogonal to this code; the matrix itself is computed below, not
// stored as a table.
package eg_ldpc_pkg;

  localparam int unsigned T      = 2;                       // EG order parameter
  localparam int unsigned N      = (1 << (2*T)) - 1;        // code length, 15
  localparam int unsigned K      = (1 << (2*T)) - 3**T;     // information bits, 7
  localparam int unsigned R      = N - K;                   // parity bits, 8
  localparam int unsigned RHO    = 1 << T;                  // row weight of H, 4
  localparam int unsigned GAMMA  = 1 << T;                  // column weight of H, 4
  // minimum distance 2^T + 1 = 5: GAMMA/2 = 2 errors corrected, 4 detected

  // g(x) = x^8 + x^4 + x^2 + x + 1 (bit i = coefficient of x^i)
  localparam logic [R:0]   GEN_POLY = 9'b1_0001_0111;
  // incidence vector of the line {0,4,6,7}: first row of H
  localparam logic [N-1:0] H_LINE   = 15'b000_0000_1101_0001;

  typedef logic [K-1:0] info_t;
  typedef logic [N-1:0] codeword_t;
  typedef logic [N-1:0] syndrome_t;

  // x^e mod g(x), returned as an R-bit remainder
  function automatic logic [R-1:0] xpow_mod_g(input int unsigned e);
    logic [R:0] rem;
    rem = (R+1)'(1);
    for (int unsigned s = 0; s < e; s++) begin
      rem = rem << 1;
      if (rem[R]) rem = rem ^ GEN_POLY;
    end
    return rem[R-1:0];
  endfunction

  // Column j of X in G = [I : X]: which information bits feed parity bit j
  function automatic info_t parity_mask(input int unsigned j);
    info_t m;
    logic [R-1:0] row;
    for (int unsigned i = 0; i < K; i++) begin
      row  = xpow_mod_g(R + i);
      m[i] = row[j];
    end
    return m;
  endfunction

  // Row r of H: the line rotated left by r positions
  function automatic codeword_t h_row(input int unsigned r);
    logic [2*N-1:0] d;
    d = {H_LINE, H_LINE} << r;
    return d[2*N-1 -: N];
  endfunction

endpackage
