// product_unit: Berlekamp's bit-serial multipliers for all generator
// coefficients, as one combinational mapping matrix (the "PLA").
//
// The quotient register R holds alpha^k z in the dual basis during bit cycle k.
// For every generator coefficient g_i, bit 0 of (alpha^k z) g_i in the dual basis
// is Tr(alpha^k z g_i), which is bit k of the product z g_i. It is a parity of
// the bits of R chosen by row i of the mapping matrix. Running this for the 8 bit
// cycles of a symbol therefore delivers every product z g_i bit-serially, with
// no multiplier hardware beyond XOR gates.
//
// Because g(x) is palindromic only rows 0..NCHK/2 exist; T_i for i > NCHK/2 is
// wired from T_(NCHK-i). The feedback term t_f = Tr(alpha^M z) is the bit R
// shifts in to step from alpha^k z to alpha^(k+1) z.
//
// Interface: r (R contents) in; t[i] = T_i, i = 0..NCHK-1, and t_f out. Purely
// combinational. The original realizes this as a PLA so that the field and
// generator can be changed by reprogramming it; here PLA_ROWS and TF_MASK play
// that part. Default rows are those of the (255,223) code (see rs_pkg).
module product_unit #(
  parameter int unsigned M    = rs_pkg::M,
  parameter int unsigned NCHK = rs_pkg::NCHK,
  parameter logic [NCHK/2:0][M-1:0] PLA_ROWS = rs_pkg::PLA_ROWS,
  parameter logic [M-1:0] TF_MASK = rs_pkg::TF_MASK
) (
  input  logic [M-1:0]    r,
  output logic [NCHK-1:0] t,
  output logic            t_f
);

  logic [NCHK/2:0] t_half;

  always_comb begin
    for (int i = 0; i <= NCHK/2; i++) t_half[i] = ^(PLA_ROWS[i] & r);
    for (int i = 0; i < NCHK; i++)
      t[i] = (i <= NCHK/2) ? t_half[i] : t_half[NCHK-i];
    t_f = ^(TF_MASK & r);
  end

endmodule
