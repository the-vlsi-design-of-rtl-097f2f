// tb_sym_shift_reg: checks that the symbol shift register delays a random bit
// stream by exactly M clocks and that a clear empties it.
// Expected q at cycle c: the d of cycle c-M, or 0 if a clear was applied in any
// of the cycles c-M .. c-1.
module tb_sym_shift_reg;
  localparam int unsigned M = 8;
  localparam int NCYC = 600;
  logic clk = 0, clr, d, q;
  int checks = 0, failures = 0;
  bit d_h [NCYC];
  bit c_h [NCYC];

  sym_shift_reg #(.M(M)) dut (.clk, .clr, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCYC; c++) begin
      d = 1'($urandom);
      clr = (c == 0) || ($urandom_range(0, 40) == 0);
      d_h[c] = d;
      c_h[c] = clr;
      #1;
      if (c >= int'(M)) begin
        bit exp_q, cleared;
        cleared = 0;
        for (int j = c - int'(M); j < c; j++) cleared |= c_h[j];
        exp_q = cleared ? 1'b0 : d_h[c-M];
        checks++;
        if (q !== exp_q) begin
          failures++;
          $display("cycle %0d: q=%0b expected %0b", c, q, exp_q);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
