// ddft_top -- hybrid CMOS/nanodevice memory with run-time data-dependent
// defect tolerance.
//
// The nanodevice array (nano_array) holds the data; the CMOS side does the
// fault tolerance. After reset, a configuration run (`cfg_start`) lets the
// segment allocator probe the array and cut it into segments, one per
// logical block, each with the weakest BCH code of the group that covers half
// of its open defects plus DELTA; the result goes to the segment table. From
// then on the host reads and writes K-bit blocks by logical address through
// the controller, which writes each block plainly or bit-wise inverted,
// whichever meets fewer defects, and records that choice in the flip memory.
//
// The allocator owns the cell port while it runs; host requests are held off
// (`req_ready` low) until it is done. Interfaces of the allocator and the
// controller are described in their own files; the host port here is the
// controller's. Defaults are the published evaluation's main configuration: 512
// user bits per block, BCH group over GF(2^10) with t up to 57, Delta = 6,
// about 1.3e5 usable cells of a 512x512 crossbar at p_wire = 0.3. The open-
// defect and transient-fault rates of the array model are parameters.
module ddft_top
  import ddft_pkg::*;
#(
  parameter int unsigned M         = M_DEF,
  parameter int unsigned K         = K_DEF,
  parameter int unsigned TMAX      = TMAX_DEF,
  parameter int unsigned T_TR      = T_TR_DEF,
  parameter int unsigned DELTA     = DELTA_DEF,
  parameter int unsigned CELLS     = CELLS_DEF,
  parameter int unsigned NBLK      = NBLK_DEF,
  parameter int unsigned P_BIT_PPM = 30000,
  parameter int unsigned P_TF_PPM  = 1000,
  parameter int unsigned WLAT      = WLAT_DEF,
  parameter int unsigned RLAT      = RLAT_DEF,
  parameter int unsigned SEED      = 1,
  parameter int unsigned BW        = clog2w(NBLK),
  parameter int unsigned LW        = clog2w(K + bch_rlen(TMAX, M) + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic          cfg_start,
  output logic          cfg_busy,
  output logic          cfg_done,
  output logic [BW:0]   nseg,
  // host block interface
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_write,
  input  logic [BW-1:0] req_addr,
  input  logic [K-1:0]  req_wdata,
  output logic          resp_valid,
  output logic [K-1:0]  resp_rdata,
  output logic [LW-1:0] resp_nerr,
  output logic          resp_flip,
  output logic          resp_fail,
  // statistics
  output logic [31:0]   st_writes,
  output logic [31:0]   st_flips,
  output logic [31:0]   st_reads,
  output logic [31:0]   st_cell_writes,
  output logic [31:0]   st_cell_reads
);

  localparam int unsigned AW = clog2w(CELLS);
  localparam int unsigned CW = clog2w(TMAX - T_TR + 1);

  // cell port
  mem_op_e       m_op, a_op, c_op;
  logic [AW-1:0] m_addr, a_addr, c_addr;
  logic          m_wdata, a_wdata, c_wdata;
  logic          m_ack, m_rdata;

  // segment table
  logic          tab_we;
  logic [BW-1:0] tab_waddr, tab_raddr;
  logic [AW-1:0] tab_whead, tab_rhead;
  logic [CW-1:0] tab_wcode, tab_rcode;

  // flip memory
  logic          flip_we, flip_wbit, flip_rbit;
  logic [BW-1:0] flip_addr;

  logic          c_ready;

  nano_array #(.CELLS(CELLS), .P_BIT_PPM(P_BIT_PPM), .P_TF_PPM(P_TF_PPM),
               .WLAT(WLAT), .RLAT(RLAT), .SEED(SEED)) u_nano (
    .clk, .rst_n, .op(m_op), .addr(m_addr), .wdata(m_wdata), .ack(m_ack), .rdata(m_rdata));

  segment_allocator #(.M(M), .K(K), .TMAX(TMAX), .T_TR(T_TR), .DELTA(DELTA),
                      .CELLS(CELLS), .NBLK(NBLK)) u_alloc (
    .clk, .rst_n, .start(cfg_start), .busy(cfg_busy), .done(cfg_done), .nseg,
    .mem_op(a_op), .mem_addr(a_addr), .mem_wdata(a_wdata), .mem_ack(m_ack && cfg_busy),
    .mem_rdata(m_rdata),
    .tab_we, .tab_addr(tab_waddr), .tab_head(tab_whead), .tab_code(tab_wcode));

  seg_table #(.NBLK(NBLK), .AW(AW), .CW(CW)) u_tab (
    .clk, .we(tab_we), .waddr(tab_waddr), .whead(tab_whead), .wcode(tab_wcode),
    .raddr(tab_raddr), .rhead(tab_rhead), .rcode(tab_rcode));

  flip_mem #(.NBLK(NBLK)) u_flip (
    .clk, .rst_n, .we(flip_we), .waddr(flip_addr), .wbit(flip_wbit),
    .raddr(flip_addr), .rbit(flip_rbit));

  ddft_controller #(.M(M), .K(K), .TMAX(TMAX), .T_TR(T_TR), .CELLS(CELLS),
                    .NBLK(NBLK)) u_ctrl (
    .clk, .rst_n, .nseg,
    .req_valid(req_valid && !cfg_busy), .req_ready(c_ready), .req_write, .req_addr,
    .req_wdata, .resp_valid, .resp_rdata, .resp_nerr, .resp_flip, .resp_fail,
    .tab_raddr, .tab_rhead, .tab_rcode,
    .flip_we, .flip_addr, .flip_wbit, .flip_rbit,
    .mem_op(c_op), .mem_addr(c_addr), .mem_wdata(c_wdata), .mem_ack(m_ack && !cfg_busy),
    .mem_rdata(m_rdata),
    .st_writes, .st_flips, .st_reads, .st_cell_writes, .st_cell_reads);

  assign req_ready = c_ready && !cfg_busy;

  always_comb begin
    if (cfg_busy) begin
      m_op = a_op;  m_addr = a_addr;  m_wdata = a_wdata;
    end else begin
      m_op = c_op;  m_addr = c_addr;  m_wdata = c_wdata;
    end
  end

endmodule
