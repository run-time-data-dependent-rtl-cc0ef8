// nano_array -- BEHAVIOURAL MODEL (not synthesizable logic) of the nanodevice
// crossbar cell array as the CMOS side sees it.
//
// The array is modelled after the defective nanowires have been removed from
// the address space: CELLS consecutive usable cells (default (1-0.3)^2 of a
// 512x512 crossbar, p_wire = 0.3). Faults follow the published scheme's fault model:
//   * open defects: each cell is open with probability P_BIT_PPM / 1e6,
//     independently; an open cell stores nothing and always reads 1;
//   * transient faults: every read returns the wrong value with probability
//     P_TF_PPM / 1e6, independently.
// The defect map is drawn at time zero from SEED; a testbench may also set
// `open_def[i]` hierarchically. Writes take WLAT cycles and reads RLAT cycles,
// a 20:1 ratio by default as in the access-time estimate the published scheme relies
// on; the single-cell access width is this model's own choice.
//
// Port: hold `op` (MEM_WRITE / MEM_READ) with `addr` and `wdata` until `ack`
// is high; the operation completes in that cycle (`rdata` valid with `ack`
// for reads) and a new one may be presented the next cycle. `ack` is
// combinational, so an access lasts exactly WLAT or RLAT cycles.
module nano_array
  import ddft_pkg::*;
#(
  parameter int unsigned CELLS     = CELLS_DEF,
  parameter int unsigned P_BIT_PPM = 30000,
  parameter int unsigned P_TF_PPM  = 1000,
  parameter int unsigned WLAT      = WLAT_DEF,
  parameter int unsigned RLAT      = RLAT_DEF,
  parameter int unsigned SEED      = 1,
  parameter int unsigned AW        = clog2w(CELLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mem_op_e       op,
  input  logic [AW-1:0] addr,
  input  logic          wdata,
  output logic          ack,
  output logic          rdata
);

  logic open_def [CELLS];   // open defect map
  logic cell_q   [CELLS];   // stored values
  logic tf_flip;            // transient fault on this cycle's read
  logic [31:0] rng;         // xorshift state of the transient-fault draw
  logic [4:0] cnt;
  int unsigned lat;
  int unsigned ndef;

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    return y ^ (y << 5);
  endfunction

  initial begin
    logic [31:0] s;
    s    = 32'h9e3779b9 ^ SEED;
    ndef = 0;
    for (int unsigned i = 0; i < CELLS; i++) begin
      s           = xorshift(s);
      open_def[i] = (s % 1000000) < P_BIT_PPM;
      cell_q[i]   = 1'b0;
      if (open_def[i]) ndef++;
    end
  end

  assign lat   = (op == MEM_WRITE) ? WLAT : RLAT;
  assign ack   = (op != MEM_IDLE) && (32'(cnt) + 1 >= lat);
  assign rdata = (32'(addr) < CELLS)
               ? ((open_def[addr] | cell_q[addr]) ^ tf_flip) : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      tf_flip <= 1'b0;
      rng     <= 32'h2545f491 ^ (SEED << 1) ^ 32'h1;
    end else begin
      rng     <= xorshift(rng);
      tf_flip <= (rng % 1000000) < P_TF_PPM;
      if (op == MEM_IDLE || ack) cnt <= '0;
      else                       cnt <= cnt + 1'b1;
      if (op == MEM_WRITE && ack && 32'(addr) < CELLS) cell_q[addr] <= wdata;
    end
  end

endmodule
