// rs_encoder: single-chip bit-serial Reed-Solomon encoder, (255,223) over GF(2^8).
//
// The encoder divides the information polynomial by the generator g(x) and
// appends the remainder. Symbols travel one bit per clock in the dual basis, and
// every product z g_i the division needs is formed bit-serially by Berlekamp's
// method: the quotient coefficient z sits in register R, which is multiplied by
// alpha once per clock, and each product bit is a parity of R's bits
// (product_unit). The 31 remainder registers (remainder_unit) each take the
// previous register's bit xor a product bit. The quotient unit gathers the next
// quotient coefficient while R works on the current one, so the top remainder
// coefficient is formed on the fly rather than stored.
//
// Pins: din (serial information bits, coefficient z0 of each symbol first), lm
// (load mode, 1 while information symbols are supplied), dout (codeword). dout
// repeats din two clocks later while information passes through; when lm has
// been low for one clock the 32 check symbols follow, r_31 first, 256 clocks in
// all. A word of k <= 223 information symbols thus needs (k+32)*8 clocks; with
// k = 223 that is 2040 clocks and words may follow back to back. lm must rise
// and fall on symbol boundaries (k*8 clocks high). Shorter k gives shortened
// codes. There is no reset pin: each rising edge of lm clears the state.
//
// Follows the published architecture: Product, Remainder, Quotient, I/O and
// Control units, the (255,223) generator with gamma = alpha^11 and its mapping
// matrix. This design's own choices: a single rising-edge clock instead of the
// two-phase NMOS clocking, static flip-flops instead of dynamic registers, the
// exact START/SL logic, and z0-first bit order.
module rs_encoder #(
  parameter int unsigned M    = rs_pkg::M,
  parameter int unsigned NCHK = rs_pkg::NCHK,
  parameter logic [NCHK/2:0][M-1:0] PLA_ROWS = rs_pkg::PLA_ROWS,
  parameter logic [M-1:0] TF_MASK = rs_pkg::TF_MASK
) (
  input  logic clk,
  input  logic din,
  input  logic lm,
  output logic dout
);

  logic                 start, sl, ld;
  logic [$clog2(M)-1:0] cnt;
  logic                 a_bit, rem_bit;
  logic [M-1:0]         r;
  logic [NCHK-1:0]      t;
  logic                 t_f;

  control_unit #(.M(M)) u_ctrl (
    .clk   (clk),
    .lm    (lm),
    .start (start),
    .sl    (sl),
    .ld    (ld),
    .cnt   (cnt)
  );

  io_unit u_io (
    .clk     (clk),
    .din     (din),
    .sl      (sl),
    .rem_bit (rem_bit),
    .a_bit   (a_bit),
    .dout    (dout)
  );

  quotient_unit #(.M(M)) u_quot (
    .clk  (clk),
    .clr  (start),
    .ld   (ld),
    .sl   (sl),
    .z_in (a_bit ^ rem_bit),
    .t_f  (t_f),
    .r    (r)
  );

  product_unit #(
    .M        (M),
    .NCHK     (NCHK),
    .PLA_ROWS (PLA_ROWS),
    .TF_MASK  (TF_MASK)
  ) u_prod (
    .r   (r),
    .t   (t),
    .t_f (t_f)
  );

  remainder_unit #(.M(M), .NCHK(NCHK)) u_rem (
    .clk     (clk),
    .clr     (start),
    .t       (t),
    .rem_bit (rem_bit)
  );

endmodule
