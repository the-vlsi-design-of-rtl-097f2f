// rs_pkg: code and field constants shared by the bit-serial Reed-Solomon encoder.
//
// The code is the (255,223) Reed-Solomon code over GF(2^8), the field built from
// the primitive polynomial x^8 + x^7 + x^2 + x + 1 with root alpha. Its generator
// is g(x) = prod_{j=112}^{143} (x - alpha^(11 j)), whose 33 coefficients are
// palindromic (g_i = g_(32-i), g_0 = g_32 = 1), so only g_0..g_16 are needed.
//
// Symbols on the serial pins are written in the dual basis {lambda_0..lambda_7} of
// the polynomial basis {1, alpha, ..., alpha^7}: bit k of symbol z is Tr(z alpha^k).
// With z in that basis, Tr(z g_i) is a parity of the bits of z selected by the
// polynomial-basis bits of g_i. PLA_ROWS[i] therefore holds g_i in the polynomial
// basis (bit k = coefficient of alpha^k), the binary mapping matrix of the design.
// TF_MASK selects the feedback term Tf = Tr(alpha^8 z) = z0 + z1 + z2 + z7, since
// alpha^8 = alpha^7 + alpha^2 + alpha + 1.
package rs_pkg;

  // Codeword length 255 symbols, of which at most 223 are information; the
  // hardware never counts symbols (the LM pin marks the information part), so
  // only the symbol width and the number of check symbols are constants here.
  localparam int unsigned M    = 8;    // bits per symbol
  localparam int unsigned NCHK = 32;   // check symbols, 2t

  // Mapping matrix rows T_0..T_16 (= g_0..g_16 in the polynomial basis).
  localparam logic [NCHK/2:0][M-1:0] PLA_ROWS = {
    8'h71,  // T16  g16 = alpha^24
    8'h20,  // T15  g15 = alpha^5
    8'hAB,  // T14  g14 = alpha^170
    8'h56,  // T13  g13 = alpha^66
    8'h36,  // T12  g12 = alpha^50
    8'h2A,  // T11  g11 = alpha^213
    8'h08,  // T10  g10 = alpha^3
    8'hA5,  // T9   g9  = alpha^30
    8'h61,  // T8   g8  = alpha^97
    8'hEB,  // T7   g7  = alpha^251
    8'h0D,  // T6   g6  = alpha^126
    8'h1E,  // T5   g5  = alpha^43
    8'h10,  // T4   g4  = alpha^4
    8'h56,  // T3   g3  = alpha^66
    8'h7F,  // T2   g2  = alpha^59
    8'h5B,  // T1   g1  = alpha^249
    8'h01   // T0   g0  = 1
  };

  // Feedback term Tf = Tr(alpha^8 z): bits z0, z1, z2 and z7.
  localparam logic [M-1:0] TF_MASK = 8'h87;

endpackage
