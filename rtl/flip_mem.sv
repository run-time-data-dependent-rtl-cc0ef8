// flip_mem -- CMOS memory of the per-block flip decisions.
//
// One bit per logical block: 1 when the block's codeword was stored
// bit-wise inverted because the plain codeword met too many open defects.
// The write/read controller writes it at the end of every block write and
// reads it at the start of every block read. Keeping one flip bit per block
// in CMOS memory follows the published scheme; the registered read and the reset to
// "not flipped" are this implementation's choices.
//
// Ports: `we`/`waddr`/`wbit` write at the clock edge; `raddr` is sampled
// each clock and `rbit` shows that entry one cycle later. Reset clears all
// bits.
module flip_mem
  import ddft_pkg::*;
#(
  parameter int unsigned NBLK = NBLK_DEF,
  parameter int unsigned BW   = clog2w(NBLK)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [BW-1:0] waddr,
  input  logic          wbit,
  input  logic [BW-1:0] raddr,
  output logic          rbit
);

  logic [NBLK-1:0] bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0;
      rbit <= 1'b0;
    end else begin
      if (we) bits[waddr] <= wbit;
      rbit <= bits[raddr];
    end
  end

endmodule
