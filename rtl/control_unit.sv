// control_unit: the control signals of the encoder.
//
// Combines the START/SL generator and the divide-by-M counter. START clears the
// counter so that symbol boundaries follow the rising edge of LM; LD marks the
// last bit cycle of each symbol. The two-phase clock generator of the original
// NMOS chip has no counterpart: everything here runs on the rising edge of clk.
//
// An assertion checks the input rule that LM must fall on a symbol boundary
// (after a whole number of information symbols): in the last information bit
// cycle, when LM has just dropped and SL is still 1, the counter must be at M-1.
//
// Interface: lm in; start, sl, ld and cnt out.
module control_unit #(
  parameter int unsigned M = rs_pkg::M
) (
  input  logic                 clk,
  input  logic                 lm,
  output logic                 start,
  output logic                 sl,
  output logic                 ld,
  output logic [$clog2(M)-1:0] cnt
);

  start_sl_gen u_start_sl (
    .clk   (clk),
    .lm    (lm),
    .sl    (sl),
    .start (start)
  );

  div_counter #(.M(M)) u_cnt (
    .clk (clk),
    .clr (start),
    .cnt (cnt),
    .ld  (ld)
  );

  // Only meaningful once a word has started.
  logic armed = 1'b0;
  always_ff @(posedge clk) if (start) armed <= 1'b1;

  a_lm_on_symbol_boundary : assert property (
    @(posedge clk) disable iff (!armed) (sl && !lm) |-> ld
  ) else $error("LM fell in the middle of a symbol");

endmodule
