// tb_rs_encoder: end-to-end test of the (255,223) encoder at its default size.
//
// Words of random information symbols (polynomial basis) are converted to the
// dual basis and shifted in on DIN, coefficient z0 first, with LM high for the
// information symbols. DOUT is compared bit by bit, two clocks behind DIN, with
// the information followed by the check symbols of a long-division reference
// encoder. Independently, every received word is converted back and evaluated
// at the 32 roots alpha^(11 j), j = 112..143: all syndromes must be zero.
//
// The run covers: two full words back to back (2040 clocks each), all-zero and
// all-ones words, shortened words of 100 and 1 information symbols, and idle
// gaps during which DOUT must stay 0. Mechanisms counted, each must occur:
// START clears, LD loads, SL switches from information to check symbols,
// back-to-back words, shortened words, and R forced to zero in the check phase.
module tb_rs_encoder;
  import rs_ref_pkg::*;
  localparam int unsigned M = 8, NCHK = 32, N = 255, K = 223;
  localparam int unsigned POLY = 'h187;

  logic clk = 0, din, lm, dout;
  int checks = 0, failures = 0;

  rs_encoder dut (.clk, .din, .lm, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // dual <-> polynomial basis tables
  int unsigned d2p [256];
  int unsigned p2d [256];
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
      for (int j = 112; j < 112 + int'(NCHK); j++)
        check($sformatf("word %0d syndrome at alpha^(11*%0d) nonzero", wi, j),
              poly_eval(rx, gf_pow(11 * j, M, POLY), M, POLY) == 0);
    end
  endtask

  function automatic void rand_info(int k, ref int unsigned q [$]);
    q = {};
    repeat (k) q.push_back($urandom_range(0, 255));
  endfunction

  always @(negedge dut.u_ctrl.sl) n_sl_fall++;

  initial begin
    int unsigned info [$];
    for (int unsigned x = 0; x < 256; x++) begin
      p2d[x] = to_dual(x, M, POLY);
      d2p[p2d[x]] = x;
    end
    g = gen_poly(M, POLY, 11, 112, NCHK);

    // idle before the first word (state not yet cleared, DOUT unchecked)
    for (int i = 0; i < 5; i++) step(0, 0, -1);

    rand_info(K, info); word(info, 0);     // full, followed directly by
    rand_info(K, info); word(info, 3);     // full, back to back
    info = {}; repeat (K) info.push_back(0);   word(info, 1);    // all zero
    info = {}; repeat (K) info.push_back(255); word(info, 0);    // all ones
    rand_info(100, info); word(info, 2);   // shortened
    rand_info(1, info);   word(info, 2);   // shortest

    for (int i = 0; i < 4; i++) step(0, 0, 0);
    verify_words();
    check("START pulses", n_start == 6);
    check("LD loads", n_ld >= 6 * 33);
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
