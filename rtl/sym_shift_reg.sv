// sym_shift_reg: one symbol-long serial shift register with clear (a remainder
// register S_i).
//
// A chain of M one-bit registers. Each clock the chain moves one place towards
// q and takes d at the far end, so a bit written at bit cycle k of one symbol
// comes out at bit cycle k of the next symbol: the register delays a serial
// symbol stream by exactly one symbol time. clr empties the chain on the same
// edge (synchronous).
//
// Interface: d in, q out (M clocks later), clr synchronous clear.
// The original circuit uses dynamic (charge-storage) one-bit cells with a reset
// transistor; here they are ordinary static flip-flops.
module sym_shift_reg #(
  parameter int unsigned M = 8
) (
  input  logic clk,
  input  logic clr,
  input  logic d,
  output logic q
);

  logic [M-1:0] sr;

  always_ff @(posedge clk) begin
    if (clr) sr <= '0;
    else     sr <= {d, sr[M-1:1]};
  end

  assign q = sr[0];

endmodule
