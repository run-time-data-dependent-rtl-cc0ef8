// bch_encoder -- bit-serial systematic encoder for a code group of shortened
// binary BCH codes.
//
// The K user bits are sent first, most significant bit first, as the
// coefficients of x^(l-1) .. x^r of the codeword; the r = deg g(x) parity bits
// follow, highest degree first. The parity is the remainder of u(x)*x^r
// divided by g(x), formed by the usual division LFSR. The LFSR taps come from
// the `g` input and its length from `r`, so one encoder serves every code of
// the group; both must hold steady during an encoding (bch_genpoly provides
// them).
//
// Interface: pulse `start` with `data` while idle. Then one code bit is
// offered per cycle on `out_bit` with `out_valid`; it advances when
// `out_ready` is high. `out_last` marks bit l-1 = K + r - 1. Back-to-back
// with `out_ready` held high an encoding takes K + r cycles.
//
// That the group uses BCH codes comes from the published scheme; bit order and the
// streaming handshake are this implementation's own choices.
module bch_encoder
  import ddft_pkg::*;
#(
  parameter int unsigned M    = M_DEF,
  parameter int unsigned K    = K_DEF,
  parameter int unsigned TMAX = TMAX_DEF,
  parameter int unsigned RMAX = bch_rlen(TMAX, M),
  parameter int unsigned DW   = clog2w(RMAX + 1),
  parameter int unsigned LW   = clog2w(K + RMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [K-1:0]  data,
  input  logic [RMAX:0] g,
  input  logic [DW-1:0] r,
  output logic          busy,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last,
  input  logic          out_ready
);

  logic [K-1:0]    dsh;    // message bits still to send, next at the top
  logic [RMAX-1:0] par;    // LFSR remainder
  logic [LW-1:0]   cnt;    // code bits already sent
  logic            active;

  logic [RMAX-1:0] mask;
  logic            top;    // remainder coefficient of x^(r-1)
  logic            fb;
  logic            in_msg;

  always_comb begin
    mask   = RMAX'(({{RMAX{1'b0}}, 1'b1} << r) - 1'b1);
    top    = (r != 0) ? par[r - 1'b1] : 1'b0;
    in_msg = (cnt < LW'(K));
    fb     = dsh[K-1] ^ top;
  end

  assign busy      = active;
  assign out_valid = active;
  assign out_bit   = in_msg ? dsh[K-1] : top;
  assign out_last  = active && (cnt == LW'(K) + LW'(r) - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsh    <= '0;
      par    <= '0;
      cnt    <= '0;
      active <= 1'b0;
    end else if (!active) begin
      if (start) begin
        dsh    <= data;
        par    <= '0;
        cnt    <= '0;
        active <= 1'b1;
      end
    end else if (out_ready) begin
      cnt <= cnt + 1'b1;
      if (in_msg) begin
        dsh <= dsh << 1;
        par <= ((par << 1) ^ (fb ? g[RMAX-1:0] : '0)) & mask;
      end else begin
        par <= (par << 1) & mask;
      end
      if (out_last) active <= 1'b0;
    end
  end

endmodule
