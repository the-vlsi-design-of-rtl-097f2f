// tb_io_unit: checks the input/output flip-flops and the SL multiplexer.
// a_bit must be DIN one clock later; DOUT must be, one clock after that, the
// information bit when SL was 1 and the check bit when SL was 0.
module tb_io_unit;
  localparam int NCYC = 500;
  logic clk = 0, din, sl, rem_bit, a_bit, dout;
  int checks = 0, failures = 0;
  bit din_h [NCYC], sl_h [NCYC], rem_h [NCYC];

  io_unit dut (.clk, .din, .sl, .rem_bit, .a_bit, .dout);

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
    for (int c = 0; c < NCYC; c++) begin
      din = 1'($urandom);
      sl = 1'($urandom);
      rem_bit = 1'($urandom);
      din_h[c] = din; sl_h[c] = sl; rem_h[c] = rem_bit;
      #1;
      if (c >= 1) check("a_bit", c, a_bit, din_h[c-1]);
      if (c >= 2) check("dout", c, dout, sl_h[c-1] ? din_h[c-2] : rem_h[c-1]);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
