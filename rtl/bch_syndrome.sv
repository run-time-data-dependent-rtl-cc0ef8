// bch_syndrome -- bit-serial syndrome computer of the BCH decoder.
//
// Computes S_j = r(alpha^j) for j = 1 .. 2*TMAX by Horner's rule while the
// received word streams in, highest degree first: on every accepted bit each
// S_j becomes S_j * alpha^j + bit. The multipliers by the constants alpha^j
// are fixed XOR networks. A weaker code of the group simply uses the first
// 2t results; shortening needs no correction because the leading (absent)
// coefficients are zero.
//
// Interface: `clear` zeroes all syndromes (one cycle, before a word); each
// cycle with `in_valid` takes `in_bit`. `syn[j-1]` holds S_j and is valid the
// cycle after the last bit. One bit per cycle, no other latency.
//
// Syndrome decoding is part of standard BCH decoding; the published scheme names only
// the use of BCH codes, so this block is the textbook structure.
module bch_syndrome
  import ddft_pkg::*;
#(
  parameter int unsigned M    = M_DEF,
  parameter int unsigned TMAX = TMAX_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic [M-1:0] syn [2*TMAX]
);

  for (genvar jj = 0; jj < 2 * TMAX; jj++) begin : g_syn
    localparam logic [M-1:0] AJ = M'(gf_alpha(jj + 1, M));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        syn[jj] <= '0;
      else if (clear)    syn[jj] <= '0;
      else if (in_valid) syn[jj] <= M'(gf_mul(16'(syn[jj]), 16'(AJ), M)) ^ M'(in_bit);
    end
  end

endmodule
