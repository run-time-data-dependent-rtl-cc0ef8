// seg_table -- CMOS configuration memory of the segment map.
//
// One entry per logical block address: the first cell of the nanodevice
// segment that holds the block's codeword and the index of the BCH code of
// the group that protects it. The segment allocator fills it once, at
// configuration time; the write/read controller looks an address up before
// every access. The codeword length follows from the code index, so it is
// not stored. Storing exactly these two fields follows the published scheme; the widths
// and the one-cycle registered read are this implementation's choices.
//
// Ports: write with `we`, `waddr`, `whead`, `wcode` (takes effect at the
// clock edge). Read: `raddr` is sampled each clock; `rhead`/`rcode` show that
// entry one cycle later. Unwritten entries read undefined values.
module seg_table
  import ddft_pkg::*;
#(
  parameter int unsigned NBLK = NBLK_DEF,
  parameter int unsigned AW   = clog2w(CELLS_DEF),
  parameter int unsigned CW   = clog2w(TMAX_DEF - T_TR_DEF + 1),
  parameter int unsigned BW   = clog2w(NBLK)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BW-1:0] waddr,
  input  logic [AW-1:0] whead,
  input  logic [CW-1:0] wcode,
  input  logic [BW-1:0] raddr,
  output logic [AW-1:0] rhead,
  output logic [CW-1:0] rcode
);

  typedef struct packed {
    logic [AW-1:0] head;
    logic [CW-1:0] code;
  } entry_t;

  entry_t mem [NBLK];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= '{head: whead, code: wcode};
    {rhead, rcode} <= mem[raddr];
  end

endmodule
