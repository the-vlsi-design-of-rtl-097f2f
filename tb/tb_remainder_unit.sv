// tb_remainder_unit: checks the remainder register chain against its closed form.
//
// After a clear at cycle 0, the chain S_0 -> ... -> S_30 with T_i added at each
// stage makes the output at cycle c the sum over stages j of the T_j bit
// applied (NCHK-1-j) symbol times earlier:
//   rem_bit(c) = XOR_j T_j(c - M*(NCHK-1-j)), terms before the clear omitted.
// Random product bits are driven for several thousand cycles, with a second
// clear in the middle.
module tb_remainder_unit;
  localparam int unsigned M = 8, NCHK = 32;
  localparam int NCYC = 3000;
  logic clk = 0, clr;
  logic [NCHK-1:0] t;
  logic rem_bit;
  int checks = 0, failures = 0;
  logic [NCHK-1:0] t_h [NCYC];
  int last_clr;

  remainder_unit #(.M(M), .NCHK(NCHK)) dut (.clk, .clr, .t, .rem_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    last_clr = -1;
    for (int c = 0; c < NCYC; c++) begin
      clr = (c == 0) || (c == 1500);
      // occasionally all-zero products, as after the last information symbol
      t = (c % 700 > 600) ? '0 : {$urandom, $urandom};
      t_h[c] = t;
      #1;
      if (c > 0) begin
        automatic bit e = 0;
        for (int j = 0; j < int'(NCHK); j++) begin
          automatic int src = c - int'(M) * (int'(NCHK) - 1 - j);
          if (src > last_clr) e ^= t_h[src][j];
        end
        checks++;
        if (rem_bit !== e) begin
          failures++;
          if (failures < 10) $display("cycle %0d: rem_bit=%0b expected %0b", c, rem_bit, e);
        end
      end
      if (clr) last_clr = c;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
