// quotient_unit: the Q and R registers that hold the quotient coefficients.
//
// z_in is the quotient bit formed this bit cycle (information bit xor the top
// remainder bit). Q, an (M-1)-bit shift register, collects bits z_0..z_(M-2) of
// the next quotient coefficient; in the last bit cycle of the symbol (ld) R is
// loaded in parallel with those bits and the bit z_(M-1) arriving at that
// moment. Between loads R steps from alpha^k z to alpha^(k+1) z in the dual basis,
// which is a plain shift (R_k <- R_(k+1)) with the feedback term t_f entering
// R_(M-1). So R presents z to the product unit while Q gathers the next one,
// a one-symbol pipeline.
//
// While sl is 0 (check symbols) the quotient input is forced to 0: Q fills with
// zeros and R is loaded with zero at the next ld, after which the products are
// all zero and the remainder registers simply shift their contents out.
//
// Interface: z_in, t_f, ld, sl in; r (R contents, bit k = dual-basis coefficient
// k) out; clr (START) clears both registers synchronously.
module quotient_unit #(
  parameter int unsigned M = rs_pkg::M
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         ld,
  input  logic         sl,
  input  logic         z_in,
  input  logic         t_f,
  output logic [M-1:0] r
);

  logic         z;
  logic [M-2:0] q;

  assign z = z_in & sl;

  always_ff @(posedge clk) begin
    if (clr || !sl) q <= '0;
    else            q <= {z, q[M-2:1]};
  end

  always_ff @(posedge clk) begin
    if (clr)     r <= '0;
    else if (ld) r <= {z, q};
    else         r <= {t_f, r[M-1:1]};
  end

endmodule
