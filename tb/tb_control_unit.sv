// tb_control_unit: runs the control unit through several words of LM (full,
// shortened and back to back) and checks START, SL, the bit-cycle count and LD:
// START only in the first clock of LM high, SL one clock behind LM, and LD on
// every 8th clock counted from the clock after START.
module tb_control_unit;
  localparam int unsigned M = 8;
  logic clk = 0, lm, start, sl, ld;
  logic [2:0] cnt;
  int checks = 0, failures = 0, n_start = 0, n_ld = 0;

  control_unit #(.M(M)) dut (.clk, .lm, .start, .sl, .ld, .cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t %s", $time, what);
    end
  endtask

  // one word: k information symbols with LM high, then 'gap' symbols low
  task automatic word(int k, int gap);
    for (int c = 0; c < (k + gap) * int'(M); c++) begin
      lm = (c < k * int'(M));
      #1;
      check("start", start == (c == 0));
      check("sl", sl == (c >= 1 && c <= k * int'(M)) || (c == 0 && sl == 0));
      if (c >= 1) begin
        check("cnt", cnt == 3'((c - 1) % M));
        check("ld", ld == ((c - 1) % M == M - 1));
      end
      if (start) n_start++;
      if (ld) n_ld++;
      @(negedge clk);
    end
  endtask

  initial begin
    lm = 0;
    repeat (3) @(negedge clk);
    word(223, 32);
    word(223, 32);
    word(10, 32);
    word(1, 40);
    check("START count", n_start == 4);
    check("LD count", n_ld >= (223 + 32) * 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
