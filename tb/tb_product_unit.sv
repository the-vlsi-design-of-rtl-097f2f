// tb_product_unit: checks the mapping matrix of the product unit exhaustively.
//
// For every field element u (polynomial basis) the quotient register is set to
// the dual-basis form of u. Each T_i must equal Tr(u g_i), i.e. bit 0 of the
// dual form of u g_i, with g_i computed here from the product definition of
// g(x), and t_f must equal Tr(alpha^M u). Two configurations are checked: the
// (255,223) code over GF(2^8) with the default rows, and the (15,11) example
// code over GF(2^4) (x^4+x+1, gamma = alpha, b = 6). The testbench also checks
// that the computed g(x) of the (255,223) code has the published coefficient
// exponents and that the dual basis is the published set of powers of alpha.
module tb_product_unit;
  import rs_ref_pkg::*;

  int checks = 0, failures = 0;

  // (255,223) configuration, defaults
  logic [7:0]  r8;
  logic [31:0] t8;
  logic        tf8;
  product_unit dut8 (.r(r8), .t(t8), .t_f(tf8));

  // (15,11) configuration: T0 = z0, T1 = z3, T2 = z1, Tf = z0 + z1
  logic [3:0] r4;
  logic [3:0] t4;
  logic       tf4;
  product_unit #(.M(4), .NCHK(4), .PLA_ROWS({4'b0010, 4'b1000, 4'b0001}), .TF_MASK(4'b0011))
    dut4 (.r(r4), .t(t4), .t_f(tf4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit got, bit exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("%s: got %0b expected %0b", what, got, exp_v);
    end
  endtask

  initial begin
    coef_t g8, g4;
    int unsigned a8;
    // exponents of g_0..g_16 as published for the (255,223) code
    int unsigned pub [17] = '{0, 249, 59, 66, 4, 43, 126, 251, 97, 30, 3, 213, 50, 66, 170, 5, 24};

    g8 = gen_poly(8, 'h187, 11, 112, 32);
    g4 = gen_poly(4, 'h13, 1, 6, 4);
    for (int i = 0; i <= 16; i++) begin
      checks++;
      if (g8[i] != gf_pow(pub[i], 8, 'h187) || g8[i] != g8[32-i]) begin
        failures++;
        $display("g_%0d = %02h, not alpha^%0d or not symmetric", i, g8[i], pub[i]);
      end
    end
    // the dual basis of {1, alpha, .., alpha^7} is {alpha^99, alpha^197,
    // alpha^203, alpha^202, alpha^201, alpha^200, alpha^199, alpha^100}
    begin
      int unsigned lam [8] = '{99, 197, 203, 202, 201, 200, 199, 100};
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (to_dual(gf_pow(lam[k], 8, 'h187), 8, 'h187) != (1 << k)) begin
          failures++;
          $display("lambda_%0d is not alpha^%0d", k, lam[k]);
        end
      end
    end
    a8 = gf_pow(8, 8, 'h187);
    for (int unsigned u = 0; u < 256; u++) begin
      r8 = 8'(to_dual(u, 8, 'h187));
      #1;
      for (int i = 0; i < 32; i++)
        check($sformatf("GF256 u=%02h T%0d", u, i), t8[i], gf_tr(gf_mul(u, g8[i], 8, 'h187), 8, 'h187));
      check($sformatf("GF256 u=%02h Tf", u), tf8, gf_tr(gf_mul(u, a8, 8, 'h187), 8, 'h187));
    end
    for (int unsigned u = 0; u < 16; u++) begin
      r4 = 4'(to_dual(u, 4, 'h13));
      #1;
      for (int i = 0; i < 4; i++)
        check($sformatf("GF16 u=%0h T%0d", u, i), t4[i], gf_tr(gf_mul(u, g4[i], 4, 'h13), 4, 'h13));
      check($sformatf("GF16 u=%0h Tf", u), tf4, gf_tr(gf_mul(u, gf_pow(4, 4, 'h13), 4, 'h13), 4, 'h13));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
