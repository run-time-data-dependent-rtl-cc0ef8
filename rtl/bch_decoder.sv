// bch_decoder -- shared decoder for every code of a BCH code group.
//
// One decoder serves all codes of the group; the code of the word being read
// is selected per word by its correction capability `t` and its length `l`.
// The word streams in bit-serially (highest degree first) into a shift
// register and, at the same time, into the syndrome unit. Berlekamp-Massey
// then finds the error locator (2t cycles) and the Chien search walks the
// positions from degree 0 upwards (l cycles), flipping each bit found in
// error as it rotates the word through the buffer. After l rotation steps
// the user bits sit at the top of the buffer whatever the code length.
//
// Interface: pulse `start` with `t` and `l` while idle, then present the l
// code bits with `in_valid` (one per cycle at most; gaps allowed). `done`
// pulses when `data` (user bits, data[K-1] first in the word), `nerr` (bits
// corrected) and `fail` (more errors than t, word left uncorrected) are
// valid; they hold until the next start. `done` rises 2t + l + 5 cycles
// after the clock edge that takes the last bit.
//
// The use of BCH codes shared by a whole code group follows the published scheme; the
// decoder structure is the textbook one.
module bch_decoder
  import ddft_pkg::*;
#(
  parameter int unsigned M    = M_DEF,
  parameter int unsigned K    = K_DEF,
  parameter int unsigned TMAX = TMAX_DEF,
  parameter int unsigned RMAX = bch_rlen(TMAX, M),
  parameter int unsigned LMAX = K + RMAX,
  parameter int unsigned TW   = clog2w(TMAX + 1),
  parameter int unsigned LW   = clog2w(LMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [TW-1:0] t,
  input  logic [LW-1:0] l,
  input  logic          in_valid,
  input  logic          in_bit,
  output logic          busy,
  output logic          done,
  output logic [K-1:0]  data,
  output logic [LW-1:0] nerr,
  output logic          fail
);

  localparam int unsigned RW = clog2w(2 * TMAX + 1);

  typedef enum logic [2:0] {D_IDLE, D_RECV, D_BM, D_CHIEN, D_FINISH} dstate_e;
  dstate_e state;

  logic [LMAX-1:0] buffer;
  logic [LW-1:0]   cnt;
  logic [TW-1:0]   t_q;
  logic [LW-1:0]   l_q;

  logic [M-1:0]  syn [2*TMAX];
  logic [M-1:0]  lambda [TMAX+1];
  logic [RW-1:0] bm_len;
  logic          bm_fail, bm_busy, bm_done, bm_start;
  logic          ch_start, ch_busy, ch_valid, ch_err, ch_done;
  logic [LW-1:0] ch_pos, ch_nroots;
  logic          take;
  logic          bm_start_q;

  assign take     = (state == D_RECV) && in_valid;
  assign bm_start = (state == D_RECV) && in_valid && (cnt + 1'b1 == l_q);
  assign ch_start = bm_done;

  bch_syndrome #(.M(M), .TMAX(TMAX)) u_syn (
    .clk, .rst_n, .clear(start && state == D_IDLE), .in_valid(take), .in_bit, .syn);

  bch_bm #(.M(M), .TMAX(TMAX)) u_bm (
    .clk, .rst_n, .start(bm_start_q), .t(t_q), .syn, .busy(bm_busy), .done(bm_done),
    .lambda, .len(bm_len), .fail(bm_fail));

  bch_chien #(.M(M), .TMAX(TMAX), .LMAX(LMAX)) u_chien (
    .clk, .rst_n, .start(ch_start), .l(l_q), .lambda, .busy(ch_busy), .err_valid(ch_valid),
    .err(ch_err), .pos(ch_pos), .done(ch_done), .nroots(ch_nroots));

  // the last syndrome update lands one cycle after the last bit
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bm_start_q <= 1'b0;
    else        bm_start_q <= bm_start;

  assign busy = (state != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= D_IDLE;
      buffer <= '0;
      cnt    <= '0;
      t_q    <= '0;
      l_q    <= '0;
      done   <= 1'b0;
      data   <= '0;
      nerr   <= '0;
      fail   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        D_IDLE: if (start) begin
          t_q   <= t;
          l_q   <= l;
          cnt   <= '0;
          state <= D_RECV;
        end
        D_RECV: if (in_valid) begin
          buffer <= {buffer[LMAX-2:0], in_bit};
          cnt    <= cnt + 1'b1;
          if (cnt + 1'b1 == l_q) state <= D_BM;
        end
        D_BM: if (bm_done) state <= D_CHIEN;
        D_CHIEN: begin
          if (ch_valid) buffer <= {buffer[0] ^ (ch_err & ~bm_fail), buffer[LMAX-1:1]};
          if (ch_done) state <= D_FINISH;
        end
        D_FINISH: begin
          data  <= buffer[LMAX-1 -: K];
          fail  <= bm_fail || (32'(ch_nroots) != 32'(bm_len));
          nerr  <= ch_nroots;
          done  <= 1'b1;
          state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
