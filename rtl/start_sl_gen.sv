// start_sl_gen: generates the control signals SL and START from LM.
//
// SL is LM delayed by one clock, so it lines up with the information bit leaving
// the input flip-flop: SL is 1 exactly in the bit cycles that process
// information bits. START is high in the one clock where LM is already 1 but SL
// is still 0, i.e. the clock whose edge captures the first information bit of a
// word; on that edge it clears the remainder, quotient and counter registers.
//
// Interface: lm in; sl (registered) and start (combinational) out. The exact
// gate network is this design's own; the original specifies only that SL is a
// delayed LM and that START clears the registers before encoding begins.
module start_sl_gen (
  input  logic clk,
  input  logic lm,
  output logic sl,
  output logic start
);

  always_ff @(posedge clk) sl <= lm;

  assign start = lm & ~sl;

endmodule
