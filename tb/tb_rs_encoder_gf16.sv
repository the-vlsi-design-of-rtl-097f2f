// tb_rs_encoder_gf16: end-to-end test of the encoder configured for the small
// worked example of the architecture, the (15,11) code over GF(2^4).
//
// Field polynomial x^4 + x + 1, gamma = alpha, b = 6, so g(x) =
// prod_{j=6}^{9} (x - alpha^j) = x^4 + alpha^3 x^3 + alpha x^2 + alpha^3 x + 1.
// The product unit gets the example's mapping matrix (T0 = z0, T1 = z3,
// T2 = z1) and feedback Tf = z0 + z1. Words are checked bit by bit against a
// reference encoder and by their four syndromes, exactly as in tb_rs_encoder:
// full words (15*4 = 60 clocks) back to back, all-zero/all-ones and shortened
// words.
module tb_rs_encoder_gf16;
  import rs_ref_pkg::*;
  localparam int unsigned M = 4, NCHK = 4, N = 15, K = 11;
  localparam int unsigned POLY = 'h13;
  localparam int unsigned GE = 1, B = 6;

  logic clk = 0, din, lm, dout;
  int checks = 0, failures = 0;

  rs_encoder #(.M(M), .NCHK(NCHK), .PLA_ROWS({4'b0010, 4'b1000, 4'b0001}), .TF_MASK(4'b0011))
    dut (.clk, .din, .lm, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // dual <-> polynomial basis tables
  int unsigned d2p [16];
  int unsigned p2d [16];
  coef_t g;

  // expected DOUT per DIN cycle: -1 = not checked
  int exp_q [$];
  int cyc = 0;

  // mechanism counters
  int n_start = 0, n_ld = 0, n_sl_fall = 0, n_r_zero = 0, n_b2b = 0, n_short = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("cycle %0d: %s", cyc, what);
    end
  endtask

  // one clock: drive at negedge, observe after the next posedge
  task automatic step(bit d, bit l, int e);
    din = d; lm = l;
    exp_q.push_back(e);
    #1;
    if (dut.u_ctrl.start) n_start++;
    @(posedge clk);
    #1;
    cyc++;
    if (dut.u_ctrl.ld) n_ld++;
    if (dut.u_ctrl.sl == 0 && dut.u_ctrl.ld == 0 && dut.u_quot.r == '0) n_r_zero++;
    @(negedge clk);
  endtask

  // samples DOUT each clock against the expectation two clocks back
  always @(posedge clk) begin
    #2;
    if (cyc >= 2 && cyc - 2 < exp_q.size()) begin
      int e;
      e = exp_q[cyc - 2];
      if (e >= 0) check($sformatf("DOUT=%0b expected %0d", dout, e), dout == e[0]);
    end
  end

  // words sent: first DIN clock, symbols (polynomial basis), info length
  int w_t0 [$];            // first DIN clock of each word
  int w_len [$];           // symbols in each word
  int w_off [$];           // offset of its symbols in w_sym
  int unsigned w_sym [$];  // all words' symbols, polynomial basis
  bit out_bits [$];   // out_bits[i] = DOUT belonging to DIN clock i

  always @(posedge clk) begin
    #3;
    if (cyc >= 2) out_bits.push_back(dout);
  end

  // one codeword of k information symbols, followed by 'idle' extra low symbols
  task automatic word(int unsigned info [$], int idle);
    int unsigned chk [$];
    int unsigned sym [$];
    int k, t0;
    k = info.size();
    ref_encode(info, g, NCHK, M, POLY, chk);
    sym = {info, chk};
    t0 = cyc;
    for (int s = 0; s < sym.size(); s++)
      for (int b = 0; b < int'(M); b++)
        step(p2d[sym[s]][b], s < k, p2d[sym[s]][b]);
    for (int i = 0; i < idle * int'(M); i++) step(0, 0, 0);
    check($sformatf("word length %0d clocks", cyc - t0), cyc - t0 == (k + NCHK + idle) * M);
    w_t0.push_back(t0);
    w_len.push_back(sym.size());
    w_off.push_back(w_sym.size());
    foreach (sym[i]) w_sym.push_back(sym[i]);
    if (k < int'(K)) n_short++;
    if (idle == 0) n_b2b++;
  endtask

  // rebuild each word from DOUT and check its symbols and syndromes
  task automatic verify_words();
    foreach (w_t0[wi]) begin
      int unsigned rx [$];
      rx = {};
      for (int s = 0; s < w_len[wi]; s++) begin
        int unsigned v;
        int base;
        v = 0;
        base = w_t0[wi] + s * int'(M);
        for (int b = 0; b < int'(M); b++) v[b] = out_bits[base + b];
        rx.push_back(d2p[v]);
      end
      for (int s = 0; s < rx.size(); s++)
        check($sformatf("word %0d symbol %0d = %02h expected %02h", wi, s, rx[s], w_sym[w_off[wi] + s]),
              rx[s] == w_sym[w_off[wi] + s]);
      for (int j = B; j < int'(B + NCHK); j++)
        check($sformatf("word %0d syndrome at alpha^%0d nonzero", wi, j),
              poly_eval(rx, gf_pow(GE * j, M, POLY), M, POLY) == 0);
    end
  endtask

  function automatic void rand_info(int k, ref int unsigned q [$]);
    q = {};
    repeat (k) q.push_back($urandom_range(0, 15));
  endfunction

  always @(negedge dut.u_ctrl.sl) n_sl_fall++;

  initial begin
    int unsigned info [$];
    for (int unsigned x = 0; x < 16; x++) begin
      p2d[x] = to_dual(x, M, POLY);
      d2p[p2d[x]] = x;
    end
    g = gen_poly(M, POLY, GE, B, NCHK);

    // idle before the first word (state not yet cleared, DOUT unchecked)
    for (int i = 0; i < 5; i++) step(0, 0, -1);

    rand_info(K, info); word(info, 0);     // full, followed directly by
    rand_info(K, info); word(info, 3);     // full, back to back
    info = {}; repeat (K) info.push_back(0);   word(info, 1);    // all zero
    info = {}; repeat (K) info.push_back(15); word(info, 0);    // all ones
    rand_info(6, info); word(info, 2);     // shortened
    rand_info(1, info);   word(info, 2);   // shortest
    for (int i = 0; i < 30; i++) begin rand_info(K, info); word(info, 0); end

    for (int i = 0; i < 4; i++) step(0, 0, 0);
    verify_words();
    check("START pulses", n_start == 36);
    check("LD loads", n_ld >= 6 * 5);
    check("SL switches", n_sl_fall >= 6);
    check("R zero in check phase", n_r_zero > 0);
    check("back-to-back words", n_b2b > 0);
    check("shortened words", n_short > 0);
    $display("mechanisms: start=%0d ld=%0d sl_fall=%0d r_zero=%0d back_to_back=%0d shortened=%0d",
             n_start, n_ld, n_sl_fall, n_r_zero, n_b2b, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
