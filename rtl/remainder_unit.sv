// remainder_unit: the remainder registers of the polynomial divider.
//
// NCHK-1 symbol shift registers S_0..S_(NCHK-2) run bit-serially side by side.
// S_0 is fed with T_0 and each S_i with S_(i-1) xor T_i, so one symbol time
// performs r_i <- r_(i-1) + z g_i for every coefficient at once. The top
// remainder coefficient r_(NCHK-1) is never stored: it is formed as it is
// needed, rem_bit = S_(NCHK-2) xor T_(NCHK-1). During information symbols
// rem_bit is added to the input to form the next quotient; after them it is the
// check symbol stream (first r_31, then r_30 .. r_0 as the registers drain).
//
// Because the quotient register holds the previous symbol's quotient while the
// current one is being formed, S_i at the end of symbol s holds the remainder
// coefficients after symbol s-1; the one-symbol lag is closed by rem_bit.
//
// Interface: t = T_0..T_(NCHK-1) in, clr (START) synchronous clear, rem_bit out
// (combinational from S_(NCHK-2) and T_(NCHK-1)).
module remainder_unit #(
  parameter int unsigned M    = rs_pkg::M,
  parameter int unsigned NCHK = rs_pkg::NCHK
) (
  input  logic            clk,
  input  logic            clr,
  input  logic [NCHK-1:0] t,
  output logic            rem_bit
);

  logic [NCHK-2:0] s_q;   // serial outputs of S_0..S_(NCHK-2)
  logic [NCHK-2:0] s_d;   // serial inputs

  always_comb begin
    s_d[0] = t[0];
    for (int i = 1; i <= NCHK-2; i++) s_d[i] = s_q[i-1] ^ t[i];
  end

  for (genvar i = 0; i <= NCHK-2; i++) begin : g_s
    sym_shift_reg #(.M(M)) u_s (
      .clk (clk),
      .clr (clr),
      .d   (s_d[i]),
      .q   (s_q[i])
    );
  end

  assign rem_bit = s_q[NCHK-2] ^ t[NCHK-1];

endmodule
