// tb_ddft_top -- end-to-end test of the whole memory at its default size:
// GF(2^10) code group with 512-bit blocks, about 1.3e5 cells, 3% open
// defects, transient faults at 1e-3 per read, Delta = 6.
//
// Flow: plant a run of 80 open cells (a defect cluster no code can cover),
// configure, then write every logical block with random data, write a few
// blocks with all-zero data (which makes every defect under a 0 an error),
// and read every block back. Checks:
//   * every segment in the table lies in the array, follows the previous one
//     and has the length of its code, and its code covers the true defect
//     count: t_def >= floor(d/2) + Delta (one cell of slack for a defect
//     hidden from the probe by a transient fault);
//   * every read returns the data last written, without failure;
//   * each write's N_err is at least the defects under stored 0s it must see,
//     less two for transient faults that can hide a defect on the read-back;
//   * the mechanisms all occur: segments with different codes, head skip
//     past a defect, plain writes (write-read) and flipped writes
//     (write-read-write), reads needing correction, reads of flipped blocks,
//     generator-polynomial reuse and recomputation, and an out-of-range
//     address rejected.
module tb_ddft_top;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int unsigned K = K_DEF, M = M_DEF, T_TR = T_TR_DEF, DELTA = DELTA_DEF;
  localparam int unsigned CELLS = CELLS_DEF, NBLK = NBLK_DEF;
  localparam int unsigned BW = clog2w(NBLK);
  localparam int unsigned LW = clog2w(K + bch_rlen(TMAX_DEF, M) + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_start, cfg_busy, cfg_done;
  logic [BW:0] nseg;
  logic req_valid, req_ready, req_write, resp_valid, resp_flip, resp_fail;
  logic [BW-1:0] req_addr;
  logic [K-1:0] req_wdata, resp_rdata;
  logic [LW-1:0] resp_nerr;
  logic [31:0] st_writes, st_flips, st_reads, st_cell_writes, st_cell_reads;

  int checks = 0, failures = 0;

  ddft_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int unsigned n_skip = 0, n_gp = 0, n_plain = 0, n_flip = 0, n_corr = 0, n_rdflip = 0;
  int unsigned n_ops = 0, n_reject = 0;
  bit code_used [64];

  always @(posedge clk) begin
    if (dut.u_alloc.state == 3'd4 && !dut.u_alloc.fits
        && 32'(dut.u_alloc.i_code) + 1 >= TMAX_DEF - T_TR + 1) n_skip++;
    if (dut.u_ctrl.gp_start) n_gp++;
  end

  bit [K-1:0] model [NBLK];
  int unsigned seg_head [NBLK], seg_len [NBLK], seg_code [NBLK];

  task automatic op(input bit wr, input int unsigned a, input bit [K-1:0] d);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = BW'(a); req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    n_ops++;
  endtask

  task automatic write_blk(input int unsigned b, input bit [K-1:0] d);
    int unsigned under0;
    bit [4095:0] g, dd, cw;
    int unsigned r;
    r = ref_genpoly(T_TR + seg_code[b], g);
    dd = '0; dd[K-1:0] = d;
    cw = ref_encode(dd, K, g, r);
    under0 = 0;
    for (int unsigned n = 0; n < seg_len[b]; n++)
      if (dut.u_nano.open_def[seg_head[b] + n] && !cw[seg_len[b] - 1 - n]) under0++;
    op(1, b, d);
    check(!resp_fail, $sformatf("write %0d failed", b));
    check(32'(resp_nerr) + 2 >= under0, $sformatf("blk %0d N_err %0d below %0d", b, resp_nerr, under0));
    check(resp_flip == (32'(resp_nerr) > seg_code[b]), $sformatf("blk %0d flip decision", b));
    if (resp_flip) n_flip++; else n_plain++;
    model[b] = d;
  endtask

  task automatic read_blk(input int unsigned b);
    op(0, b, '0);
    check(!resp_fail, $sformatf("read %0d failed", b));
    check(resp_rdata == model[b], $sformatf("read %0d data", b));
    if (resp_nerr != 0) n_corr++;
    if (resp_flip) n_rdflip++;
  endtask

  initial begin
    int unsigned nb, prev_end, d, ncodes, cyc;
    bit [K-1:0] dat;
    cfg_start = 0; req_valid = 0; req_write = 0; req_addr = '0; req_wdata = '0;
    ref_init(M);
    repeat (3) @(negedge clk);
    for (int unsigned c = 60000; c < 60080; c++) dut.u_nano.open_def[c] = 1;
    rst_n = 1;
    @(negedge clk); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    cyc = 0;
    while (!cfg_done) begin @(negedge clk); cyc++; end
    nb = nseg;
    $display("configured %0d blocks in %0d cycles", nb, cyc);
    check(nb > 100 && nb <= NBLK, $sformatf("segment count %0d", nb));
    // segment table against the true defect map
    prev_end = 0;
    for (int unsigned b = 0; b < nb; b++) begin
      seg_head[b] = 32'(dut.u_tab.mem[b].head);
      seg_code[b] = 32'(dut.u_tab.mem[b].code);
      seg_len[b]  = K + ref_rlen(T_TR + seg_code[b]);
      code_used[seg_code[b]] = 1;
      d = 0;
      for (int unsigned n = 0; n < seg_len[b]; n++) if (dut.u_nano.open_def[seg_head[b] + n]) d++;
      check(seg_head[b] >= prev_end && seg_head[b] + seg_len[b] <= CELLS,
            $sformatf("segment %0d placement", b));
      check(seg_code[b] + 1 >= d / 2 + DELTA, $sformatf("segment %0d: code %0d for %0d defects",
            b, seg_code[b], d));
      prev_end = seg_head[b] + seg_len[b];
    end
    ncodes = 0;
    foreach (code_used[i]) if (code_used[i]) ncodes++;
    // write all blocks with random data, then all-zero data to some
    for (int unsigned b = 0; b < nb; b++) begin
      for (int unsigned i = 0; i < K / 32; i++) dat[32*i +: 32] = $urandom;
      write_blk(b, dat);
    end
    for (int unsigned b = 0; b < nb; b += 9) write_blk(b, '0);
    for (int unsigned b = 0; b < nb; b++) read_blk(b);
    for (int unsigned b = 0; b < 6; b++) read_blk(b);
    op(0, nb, '0);
    if (resp_fail) n_reject++;
    $display("codes used %0d, head skips %0d, plain writes %0d, flipped writes %0d",
             ncodes, n_skip, n_plain, n_flip);
    $display("reads corrected %0d, reads of flipped blocks %0d, polynomial builds %0d of %0d ops",
             n_corr, n_rdflip, n_gp, n_ops);
    $display("cell writes %0d, cell reads %0d", st_cell_writes, st_cell_reads);
    check(ncodes >= 2, "several codes used");
    check(n_skip >= 1, "head skip happened");
    check(n_plain >= 1, "plain write happened");
    check(n_flip >= 1, "flipped write happened");
    check(n_corr >= 1, "corrected read happened");
    check(n_rdflip >= 1, "read of flipped block happened");
    check(n_gp >= 1 && n_gp < n_ops, "polynomial both rebuilt and reused");
    check(n_reject == 1, "out-of-range address rejected");
    check(st_flips == n_flip && st_writes == n_flip + n_plain, "write statistics");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
