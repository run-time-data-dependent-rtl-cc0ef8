// bch_genpoly -- generator polynomial of the t-error-correcting BCH code.
//
// All codes of a code group share one encoder, so the encoder's feedback taps
// must follow the code chosen for the block being written. This unit builds
// g(x) = LCM of the minimal polynomials of alpha^1 .. alpha^(2t) at run time:
// for every odd j <= 2t-1 that leads its cyclotomic coset (the rotations of
// j's m-bit pattern), it forms the minimal polynomial m_j(x) as the product of
// (x + alpha^(j*2^k)) over the coset, one factor per cycle, and then multiplies
// g(x) by m_j(x) over GF(2) in one cycle. Even exponents and repeated cosets
// add nothing and are skipped in one cycle.
//
// Interface: pulse `start` with `t` (1..TMAX) while `busy` is low. `busy`
// stays high until the result is ready; `done` pulses for one cycle when
// `g` (bit i = coefficient of x^i) and its degree `deg` are valid. They hold
// until the next start. Latency is at most 2t + deg(g) + 2 cycles: 621
// cycles for t = 57 over GF(2^10).
//
// The sharing of one encoder/decoder by the whole code group comes from the
// design; building the polynomial in hardware rather than storing one per
// code is this implementation's choice.
module bch_genpoly
  import ddft_pkg::*;
#(
  parameter int unsigned M    = M_DEF,
  parameter int unsigned TMAX = TMAX_DEF,
  parameter int unsigned RMAX = bch_rlen(TMAX, M),
  parameter int unsigned TW   = clog2w(TMAX + 1),
  parameter int unsigned DW   = clog2w(RMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [TW-1:0] t,
  output logic          busy,
  output logic          done,
  output logic [RMAX:0] g,
  output logic [DW-1:0] deg
);

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_MINPOLY, S_MULG} state_e;
  state_e state;

  logic [15:0]  j;          // current odd exponent
  logic [M-1:0] aj;         // alpha^j
  logic [M-1:0] beta;       // current conjugate alpha^(j*2^k)
  logic [M-1:0] mp [M+1];   // minimal polynomial under construction
  logic [3:0]   k;          // factors multiplied so far
  logic [3:0]   inc;        // coset size of j (0 when not a leader)
  logic [TW-1:0] t_q;
  logic [3:0]   inc_now;

  localparam logic [M-1:0] ALPHA2 = M'(gf_alpha(2, M));

  assign inc_now = 4'(coset_incr(j, M));

  // g(x) * m_j(x) over GF(2); the minimal polynomial has binary coefficients
  function automatic logic [RMAX:0] mul_gf2(input logic [RMAX:0] a, input logic [M:0] b);
    logic [RMAX:0] r;
    r = '0;
    for (int unsigned i = 0; i <= M; i++)
      if (b[i]) r = r ^ (a << i);
    return r;
  endfunction

  logic [M:0] mp_bits;
  always_comb
    for (int unsigned i = 0; i <= M; i++) mp_bits[i] = mp[i][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      g     <= '0;
      deg   <= '0;
      j     <= '0;
      aj    <= '0;
      beta  <= '0;
      k     <= '0;
      inc   <= '0;
      t_q   <= '0;
      for (int unsigned i = 0; i <= M; i++) mp[i] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          g     <= (RMAX+1)'(1);
          deg   <= '0;
          j     <= 16'd1;
          aj    <= M'(2);
          t_q   <= t;
          state <= S_CHECK;
        end
        S_CHECK: begin
          if (32'(j) > 2 * 32'(t_q) - 1 || t_q == 0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (inc_now != 0) begin
            mp[0] <= M'(1);
            for (int unsigned i = 1; i <= M; i++) mp[i] <= '0;
            beta  <= aj;
            inc   <= inc_now;
            k     <= '0;
            state <= S_MINPOLY;
          end else begin
            j  <= j + 16'd2;
            aj <= M'(gf_mul(16'(aj), 16'(ALPHA2), M));
          end
        end
        S_MINPOLY: begin
          // mp(x) <- mp(x) * (x + beta)
          mp[0] <= M'(gf_mul(16'(mp[0]), 16'(beta), M));
          for (int unsigned i = 1; i <= M; i++)
            mp[i] <= mp[i-1] ^ M'(gf_mul(16'(mp[i]), 16'(beta), M));
          beta <= M'(gf_mul(16'(beta), 16'(beta), M));
          k    <= k + 4'd1;
          if (k + 4'd1 == inc) state <= S_MULG;
        end
        S_MULG: begin
          g     <= mul_gf2(g, mp_bits);
          deg   <= deg + DW'(inc);
          j     <= j + 16'd2;
          aj    <= M'(gf_mul(16'(aj), 16'(ALPHA2), M));
          state <= S_CHECK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
