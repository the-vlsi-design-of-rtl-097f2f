// div_counter: the divide-by-M bit-cycle counter that marks symbol boundaries.
//
// cnt counts bit cycles 0..M-1 of a symbol and wraps; ld is high in bit cycle
// M-1, when the quotient register takes its new coefficient. clr (START) sets
// cnt to 0 on the edge that captures the first information bit, so that bit is
// bit cycle 0 of symbol 0.
//
// Interface: clr in; cnt and ld out (ld decoded from cnt). A plain binary counter
// is this design's choice; the original specifies only a divide-by-8 counter.
module div_counter #(
  parameter int unsigned M = rs_pkg::M
) (
  input  logic                 clk,
  input  logic                 clr,
  output logic [$clog2(M)-1:0] cnt,
  output logic                 ld
);

  localparam int unsigned CW = $clog2(M);
  localparam logic [CW-1:0] LAST = CW'(M - 1);

  always_ff @(posedge clk) begin
    if (clr || cnt == LAST) cnt <= '0;
    else                    cnt <= cnt + 1'b1;
  end

  assign ld = (cnt == LAST);

endmodule
