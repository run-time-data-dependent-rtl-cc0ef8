// bch_bm -- inversionless Berlekamp-Massey solver of the BCH decoder.
//
// From the syndromes S_1 .. S_2t it finds the error-locator polynomial
// Lambda(x), whose roots are the inverses of the error locations, and its
// length L (the number of errors when decoding succeeds). Each of the 2t
// iterations takes one cycle:
//   delta   = sum_i Lambda_i * S_(r+1-i)
//   Lambda <- gamma*Lambda + delta * x*B
//   if delta != 0 and 2L <= r:  B <- old Lambda, L <- r+1-L, gamma <- delta
//   else                        B <- x*B
// The syndromes needed for delta sit in a window register that shifts by one
// per iteration, so only one variable syndrome select is needed. The result is
// a scalar multiple of the usual locator, which leaves its roots unchanged.
//
// Interface: pulse `start` with `t` (1..TMAX) while idle; `syn` must hold
// steady until `done`. `done` pulses 2t + 1 cycles after `start`; `lambda`
// (coefficient i of x^i) and `len` then hold until the next start. `fail` is
// set when L > t: more errors than the code can correct.
//
// The published scheme names BCH decoding only; this is the textbook
// algorithm.
module bch_bm
  import ddft_pkg::*;
#(
  parameter int unsigned M    = M_DEF,
  parameter int unsigned TMAX = TMAX_DEF,
  parameter int unsigned TW   = clog2w(TMAX + 1),
  parameter int unsigned RW   = clog2w(2 * TMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [TW-1:0] t,
  input  logic [M-1:0]  syn [2*TMAX],
  output logic          busy,
  output logic          done,
  output logic [M-1:0]  lambda [TMAX+1],
  output logic [RW-1:0] len,
  output logic          fail
);

  logic [M-1:0]  b   [TMAX+1];
  logic [M-1:0]  sw  [TMAX+1];   // sw[i] = S_(r+1-i), zero below S_1
  logic [M-1:0]  gamma;
  logic [RW-1:0] r;
  logic [TW-1:0] t_q;
  logic          active;

  logic [M-1:0]  delta;
  logic [M-1:0]  s_next;         // S_(r+2)

  always_comb begin
    delta = '0;
    for (int unsigned i = 0; i <= TMAX; i++)
      delta = delta ^ M'(gf_mul(16'(lambda[i]), 16'(sw[i]), M));
    s_next = (32'(r) + 1 < 2 * TMAX) ? syn[32'(r) + 1] : '0;
  end

  assign busy = active;
  assign fail = (32'(len) > 32'(t_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i <= TMAX; i++) begin
        lambda[i] <= '0;
        b[i]      <= '0;
        sw[i]     <= '0;
      end
      gamma  <= '0;
      r      <= '0;
      len    <= '0;
      t_q    <= '0;
      active <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          for (int unsigned i = 0; i <= TMAX; i++) begin
            lambda[i] <= (i == 0) ? M'(1) : '0;
            b[i]      <= (i == 0) ? M'(1) : '0;
            sw[i]     <= (i == 0) ? syn[0] : '0;
          end
          gamma  <= M'(1);
          r      <= '0;
          len    <= '0;
          t_q    <= t;
          active <= 1'b1;
        end
      end else begin
        for (int unsigned i = 0; i <= TMAX; i++)
          lambda[i] <= M'(gf_mul(16'(gamma), 16'(lambda[i]), M))
                     ^ ((i > 0) ? M'(gf_mul(16'(delta), 16'(b[i-1]), M)) : '0);
        if (delta != '0 && 2 * 32'(len) <= 32'(r)) begin
          for (int unsigned i = 0; i <= TMAX; i++) b[i] <= lambda[i];
          len   <= r + 1'b1 - len;
          gamma <= delta;
        end else begin
          for (int unsigned i = 0; i <= TMAX; i++) b[i] <= (i > 0) ? b[i-1] : '0;
        end
        for (int unsigned i = 0; i <= TMAX; i++) sw[i] <= (i > 0) ? sw[i-1] : s_next;
        r <= r + 1'b1;
        if (32'(r) + 1 == 2 * 32'(t_q)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
