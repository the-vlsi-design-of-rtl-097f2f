// tb_div_counter: checks the divide-by-8 counter: after a clear, cnt runs
// 0,1,..,7,0,.. and LD is high exactly when cnt is 7, i.e. on every 8th clock
// counted from the clear. Clears arrive at random points.
module tb_div_counter;
  localparam int unsigned M = 8;
  localparam int NCYC = 1500;
  logic clk = 0, clr, ld;
  logic [2:0] cnt;
  int checks = 0, failures = 0;

  div_counter #(.M(M)) dut (.clk, .clr, .cnt, .ld);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since;   // clocks since the last clear took effect
    since = -1;
    for (int c = 0; c < NCYC; c++) begin
      clr = (c == 0) || ($urandom_range(0, 60) == 0);
      #1;
      if (since >= 0) begin
        checks++;
        if (cnt !== 3'(since % M) || ld !== (since % M == M - 1)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: cnt=%0d ld=%0b, %0d clocks after clear", c, cnt, ld, since);
        end
      end
      since = clr ? 0 : (since < 0 ? -1 : since + 1);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
