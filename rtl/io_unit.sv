// io_unit: input and output buffering of the serial encoder.
//
// F0 registers DIN. The output multiplexer, controlled by SL, chooses the
// registered information bit while information symbols pass through, and the
// check bit from the remainder unit afterwards; F1 registers that choice onto
// DOUT. The codeword thus leaves the chip two clocks after the matching DIN bit,
// information symbols unchanged and check symbols appended.
//
// Interface: din, sl, rem_bit in; a_bit (F0, the information bit used inside the
// encoder) and dout (F1) out. Neither flip-flop is cleared by START, so words may
// follow each other without a gap (this design's choice).
module io_unit (
  input  logic clk,
  input  logic din,
  input  logic sl,
  input  logic rem_bit,
  output logic a_bit,
  output logic dout
);

  always_ff @(posedge clk) begin
    a_bit <= din;
    dout  <= sl ? a_bit : rem_bit;
  end

endmodule
