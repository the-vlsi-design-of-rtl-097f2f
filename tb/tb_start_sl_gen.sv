// tb_start_sl_gen: checks that SL is LM delayed by one clock and that START is
// high exactly in the first clock of each high period of LM.
module tb_start_sl_gen;
  localparam int NCYC = 2000;
  logic clk = 0, lm, sl, start;
  int checks = 0, failures = 0, n_start = 0;
  bit lm_h [NCYC];

  start_sl_gen dut (.clk, .lm, .sl, .start);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int c, bit got, bit exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("cycle %0d %s: got %0b expected %0b", c, what, got, exp_v);
    end
  endtask

  initial begin
    int run;
    lm = 0;
    run = 0;
    for (int c = 0; c < NCYC; c++) begin
      // LM in runs of random length, including single-clock pulses
      if (run == 0) begin
        lm = (c == 0) ? 1'b0 : ~lm;
        run = $urandom_range(1, 30);
      end
      run--;
      lm_h[c] = lm;
      #1;
      if (c >= 1) begin
        check("sl", c, sl, lm_h[c-1]);
        check("start", c, start, lm_h[c] && !lm_h[c-1]);
        if (start) n_start++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_start < 10) begin failures++; $display("too few START pulses: %0d", n_start); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
