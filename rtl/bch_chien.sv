// bch_chien -- Chien search of the BCH decoder.
//
// Tests every coefficient position p = 0 .. l-1 of the shortened codeword,
// one per cycle, for being in error: position p is wrong exactly when
// Lambda(alpha^-p) = 0. Register i starts at Lambda_i and is multiplied by the
// constant alpha^-i each cycle, so in cycle p it holds Lambda_i*alpha^(-ip)
// and the XOR of all registers is Lambda(alpha^-p). Only the l positions of
// the shortened code are searched, so a locator with roots elsewhere shows up
// as a root count that differs from its length (decoding failure).
//
// Interface: pulse `start` with the word length `l` while idle; `lambda` must
// hold steady for that cycle only. For l cycles `err_valid` is high and
// `err` says whether position `pos` (degree) is in error. `done` pulses the
// cycle after the last position; `nroots` then holds the number of errors
// found until the next start.
//
// The published scheme names BCH decoding only; this is the textbook
// algorithm.
module bch_chien
  import ddft_pkg::*;
#(
  parameter int unsigned M    = M_DEF,
  parameter int unsigned TMAX = TMAX_DEF,
  parameter int unsigned LMAX = K_DEF + bch_rlen(TMAX, M),
  parameter int unsigned LW   = clog2w(LMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] l,
  input  logic [M-1:0]  lambda [TMAX+1],
  output logic          busy,
  output logic          err_valid,
  output logic          err,
  output logic [LW-1:0] pos,
  output logic          done,
  output logic [LW-1:0] nroots
);

  logic [M-1:0]  c [TMAX+1];
  logic [LW-1:0] l_q;
  logic          active;
  logic [M-1:0]  sum;

  always_comb begin
    sum = '0;
    for (int unsigned i = 0; i <= TMAX; i++) sum = sum ^ c[i];
  end

  assign busy      = active;
  assign err_valid = active;
  assign err       = active && (sum == '0);

  for (genvar ii = 0; ii <= TMAX; ii++) begin : g_reg
    localparam int unsigned NF = (1 << M) - 1;
    localparam logic [M-1:0] AINV = M'(gf_alpha(NF - (ii % NF), M));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)           c[ii] <= '0;
      else if (!active && start) c[ii] <= lambda[ii];
      else if (active)      c[ii] <= M'(gf_mul(16'(c[ii]), 16'(AINV), M));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q    <= '0;
      pos    <= '0;
      nroots <= '0;
      active <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          l_q    <= l;
          pos    <= '0;
          nroots <= '0;
          active <= (l != 0);
          done   <= (l == 0);
        end
      end else begin
        if (err) nroots <= nroots + 1'b1;
        pos <= pos + 1'b1;
        if (pos + 1'b1 == l_q) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
