// tb_quotient_unit: checks the Q/R quotient pipeline.
//
// The testbench plays the product unit: it closes the feedback loop with
// t_f = Tr(alpha^8 z'), z' being the field element R currently holds, computed
// with reference field arithmetic. Random quotient bits arrive one per clock;
// LD comes every 8th clock. In bit cycle k of a symbol, R must hold the dual
// form of alpha^k Z, where Z is the quotient coefficient whose bits arrived in
// the previous symbol, or zero when SL was 0 then (check-symbol phase).
module tb_quotient_unit;
  import rs_ref_pkg::*;
  localparam int unsigned M = 8;
  localparam int unsigned POLY = 'h187;
  localparam int NSYM = 120;
  logic clk = 0, clr, ld, sl, z_in, t_f;
  logic [M-1:0] r;
  int checks = 0, failures = 0;
  int unsigned a8;

  quotient_unit #(.M(M)) dut (.clk, .clr, .ld, .sl, .z_in, .t_f, .r);

  always #5 clk = ~clk;

  always_comb t_f = gf_tr(gf_mul(from_dual(r, M, POLY), a8, M, POLY), M, POLY);

  initial begin
    repeat (NSYM * M + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned zprev, zcur;
    bit sl_prev;
    a8 = gf_pow(M, M, POLY);
    clr = 1; ld = 0; sl = 1; z_in = 0;
    @(negedge clk);
    clr = 0;
    zprev = 0;
    for (int s = 0; s < NSYM; s++) begin
      sl = !((s >= 40 && s < 50) || (s >= 100));
      zcur = 0;
      for (int k = 0; k < int'(M); k++) begin
        z_in = 1'($urandom);
        zcur[k] = z_in;
        ld = (k == int'(M) - 1);
        #1;
        checks++;
        if (r !== M'(to_dual(gf_mul(zprev, gf_pow(k, M, POLY), M, POLY), M, POLY))) begin
          failures++;
          if (failures < 10)
            $display("sym %0d bit %0d: R=%02h expected alpha^%0d * %02h", s, k, r, k, zprev);
        end
        @(negedge clk);
      end
      zprev = sl ? from_dual(zcur, M, POLY) : 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
