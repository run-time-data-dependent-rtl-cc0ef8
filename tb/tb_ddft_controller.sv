// tb_ddft_controller -- self-checking test of the write/read controller with
// conditional bit flipping, at full code size (GF(2^10), 512 user bits,
// t = 17 + code index), on an 8192-cell array model without transient faults.
//
// The testbench loads four segments into the segment table and plants a known
// number of open defects in each. For every write it works out the codeword
// with the reference package and counts the defects that sit under a stored
// 0: that is the expected N_err, and the block must be flipped exactly when
// N_err > t_def. All-zero data (every defect an error) forces flips, random
// data mostly does not. Reads must return the written data with the expected
// number of corrected bits. Write time must be l*(WLAT+RLAT) cycles, plus
// l*WLAT when flipped, plus encoding (l cycles), the polynomial when t
// changes, and a fixed overhead; a read of a cached code takes l*RLAT plus
// the decoder latency. An address beyond the segment count must fail.
module tb_ddft_controller;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int unsigned M = 10, K = 512, TMAX = 57, T_TR = 17;
  localparam int unsigned CELLS = 8192, NBLK = 256, WLAT = 20, RLAT = 1;
  localparam int unsigned AW = clog2w(CELLS), CW = clog2w(TMAX - T_TR + 1), BW = clog2w(NBLK);
  localparam int unsigned LW = clog2w(K + bch_rlen(TMAX, M) + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [BW:0] nseg;
  logic req_valid, req_ready, req_write, resp_valid, resp_flip, resp_fail;
  logic [BW-1:0] req_addr, tab_raddr, flip_addr, tab_waddr;
  logic [K-1:0] req_wdata, resp_rdata;
  logic [LW-1:0] resp_nerr;
  logic [AW-1:0] tab_rhead, tab_whead;
  logic [CW-1:0] tab_rcode, tab_wcode;
  logic flip_we, flip_wbit, flip_rbit, tab_we;
  mem_op_e mem_op;
  logic [AW-1:0] mem_addr;
  logic mem_wdata, mem_ack, mem_rdata;
  logic [31:0] st_writes, st_flips, st_reads, st_cell_writes, st_cell_reads;

  int checks = 0, failures = 0;

  ddft_controller #(.M(M), .K(K), .TMAX(TMAX), .T_TR(T_TR), .CELLS(CELLS), .NBLK(NBLK)) dut (.*);
  nano_array #(.CELLS(CELLS), .P_BIT_PPM(0), .P_TF_PPM(0), .WLAT(WLAT), .RLAT(RLAT)) u_mem (
    .clk, .rst_n, .op(mem_op), .addr(mem_addr), .wdata(mem_wdata), .ack(mem_ack),
    .rdata(mem_rdata));
  seg_table #(.NBLK(NBLK), .AW(AW), .CW(CW)) u_tab (
    .clk, .we(tab_we), .waddr(tab_waddr), .whead(tab_whead), .wcode(tab_wcode),
    .raddr(tab_raddr), .rhead(tab_rhead), .rcode(tab_rcode));
  flip_mem #(.NBLK(NBLK)) u_flip (
    .clk, .rst_n, .we(flip_we), .waddr(flip_addr), .wbit(flip_wbit), .raddr(flip_addr),
    .rbit(flip_rbit));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned seg_head [4] = '{0, 2000, 4000, 6000};
  int unsigned seg_code [4] = '{10, 0, 40, 6};
  int unsigned seg_ndef [4] = '{20, 1, 80, 12};
  bit [K-1:0]  stored   [4];
  int unsigned exp_rderr[4];
  int unsigned last_t = 0;
  int unsigned nflip = 0, nplain = 0;

  task automatic op(input bit wr, input int unsigned a, input bit [K-1:0] d, output int unsigned cyc);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = BW'(a); req_wdata = d;
    @(negedge clk);
    req_valid = 0;
    cyc = 1;
    while (!resp_valid) begin @(negedge clk); cyc++; end
  endtask

  task automatic do_write(input int unsigned b, input bit [K-1:0] d);
    bit [4095:0] g, dd, cw;
    int unsigned r, ll, tt, nerr, cyc, base;
    bit fl;
    tt = T_TR + seg_code[b];
    r = ref_genpoly(tt, g);
    ll = K + r;
    dd = '0; dd[K-1:0] = d;
    cw = ref_encode(dd, K, g, r);
    nerr = 0;
    for (int unsigned n = 0; n < ll; n++)
      if (u_mem.open_def[seg_head[b] + n] && !cw[ll - 1 - n]) nerr++;
    fl = nerr > seg_code[b];
    op(1, b, d, cyc);
    check(32'(resp_nerr) == nerr, $sformatf("blk %0d N_err %0d vs %0d", b, resp_nerr, nerr));
    check(resp_flip == fl, $sformatf("blk %0d flip %0b", b, resp_flip));
    check(!resp_fail, "write fail flag");
    base = ll * (WLAT + RLAT) + (fl ? ll * WLAT : 0) + ll + 9;
    if (tt == last_t) check(cyc == base, $sformatf("blk %0d write cycles %0d vs %0d", b, cyc, base));
    else check(cyc > base && cyc <= base + 2 * tt + r + 3, $sformatf("blk %0d write cycles %0d", b, cyc));
    last_t = tt;
    stored[b] = d;
    exp_rderr[b] = fl ? seg_ndef[b] - nerr : nerr;
    if (fl) nflip++; else nplain++;
  endtask

  task automatic do_read(input int unsigned b);
    int unsigned cyc, tt, ll, base;
    tt = T_TR + seg_code[b];
    ll = K + ref_rlen(tt);
    op(0, b, '0, cyc);
    check(resp_rdata == stored[b], $sformatf("blk %0d read data", b));
    check(!resp_fail, $sformatf("blk %0d read fail", b));
    check(32'(resp_nerr) == exp_rderr[b], $sformatf("blk %0d corrected %0d vs %0d", b, resp_nerr, exp_rderr[b]));
    base = ll * RLAT + 2 * tt + ll + 5 + 7;
    if (tt == last_t) check(cyc == base, $sformatf("blk %0d read cycles %0d vs %0d", b, cyc, base));
    last_t = tt;
  endtask

  initial begin
    int unsigned cyc, c;
    bit [K-1:0] d;
    req_valid = 0; req_write = 0; req_addr = '0; req_wdata = '0;
    tab_we = 0; tab_waddr = '0; tab_whead = '0; tab_wcode = '0;
    nseg = 4;
    ref_init(M);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // plant the defects and load the segment table
    for (int unsigned b = 0; b < 4; b++) begin
      for (int unsigned k = 0; k < seg_ndef[b]; k++) begin
        do c = seg_head[b] + $urandom % (K + ref_rlen(T_TR + seg_code[b]));
        while (u_mem.open_def[c]);
        u_mem.open_def[c] = 1;
      end
      @(negedge clk);
      tab_we = 1; tab_waddr = BW'(b); tab_whead = AW'(seg_head[b]); tab_wcode = CW'(seg_code[b]);
    end
    @(negedge clk); tab_we = 0;
    // all-zero data: every defect is an error
    for (int unsigned b = 0; b < 4; b++) begin do_write(b, '0); do_read(b); do_read(b); end
    // random data
    for (int unsigned k = 0; k < 12; k++) begin
      int unsigned b;
      b = $urandom % 4;
      for (int unsigned i = 0; i < K / 32; i++) d[32*i +: 32] = $urandom;
      do_write(b, d);
      do_read(b);
      do_read($urandom % 4);
    end
    // all-ones data
    do_write(2, '1); do_read(2);
    // unmapped address
    op(0, 7, '0, cyc);
    check(resp_fail, "unmapped address must fail");
    check(nflip > 0 && nplain > 0, $sformatf("flipped %0d plain %0d", nflip, nplain));
    check(st_flips == nflip && st_writes == nflip + nplain, "statistics");
    $display("writes %0d flipped %0d", st_writes, st_flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
