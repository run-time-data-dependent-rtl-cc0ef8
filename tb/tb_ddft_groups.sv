// tb_ddft_groups -- the two larger configurations of the published evaluation:
// 1024-bit blocks with a BCH group over GF(2^11) (t up to 106) and 2048-bit
// blocks over GF(2^12) (t up to 198), each on a reduced array (30000 and
// 40000 cells instead of about 1.3e5) to keep the run short. The
// transient-fault reserve T_TR is 21 and 29: the smallest t meeting a
// 1e-15 block error rate at a 1e-3 fault rate for 2047- and 4095-bit words.
//
// For each configuration: allocate, check every segment's code against the
// true defect count (t_def >= floor(d/2) + Delta, one cell of slack for a
// probe hidden by a transient fault), write blocks with random and all-zero
// data, read them back, and require correct data, at least one flipped and one
// plain write, and no decoding failure.
module tb_ddft_groups;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one configuration under test
  `define GROUP_TEST(NAME, GM, GK, GTMAX, GTTR, GCELLS)                                     \
  localparam int unsigned NAME``_BW = clog2w(NBLK_DEF);                                     \
  localparam int unsigned NAME``_LW = clog2w(GK + bch_rlen(GTMAX, GM) + 1);                 \
  logic NAME``_cfg_start = 0, NAME``_cfg_busy, NAME``_cfg_done;                             \
  logic [NAME``_BW:0] NAME``_nseg;                                                          \
  logic NAME``_req_valid = 0, NAME``_req_ready, NAME``_req_write = 0;                       \
  logic NAME``_resp_valid, NAME``_resp_flip, NAME``_resp_fail;                              \
  logic [NAME``_BW-1:0] NAME``_req_addr = '0;                                               \
  logic [GK-1:0] NAME``_req_wdata = '0, NAME``_resp_rdata;                                  \
  logic [NAME``_LW-1:0] NAME``_resp_nerr;                                                   \
  logic [31:0] NAME``_st [5];                                                               \
  ddft_top #(.M(GM), .K(GK), .TMAX(GTMAX), .T_TR(GTTR), .CELLS(GCELLS)) NAME``_dut (        \
    .clk, .rst_n, .cfg_start(NAME``_cfg_start), .cfg_busy(NAME``_cfg_busy),                 \
    .cfg_done(NAME``_cfg_done), .nseg(NAME``_nseg), .req_valid(NAME``_req_valid),           \
    .req_ready(NAME``_req_ready), .req_write(NAME``_req_write), .req_addr(NAME``_req_addr), \
    .req_wdata(NAME``_req_wdata), .resp_valid(NAME``_resp_valid),                           \
    .resp_rdata(NAME``_resp_rdata), .resp_nerr(NAME``_resp_nerr),                           \
    .resp_flip(NAME``_resp_flip), .resp_fail(NAME``_resp_fail),                             \
    .st_writes(NAME``_st[0]), .st_flips(NAME``_st[1]), .st_reads(NAME``_st[2]),             \
    .st_cell_writes(NAME``_st[3]), .st_cell_reads(NAME``_st[4]));                           \
  task automatic NAME``_op(input bit wr, input int unsigned a, input bit [GK-1:0] d);        \
    @(negedge clk);                                                                         \
    NAME``_req_valid = 1; NAME``_req_write = wr; NAME``_req_addr = NAME``_BW'(a);           \
    NAME``_req_wdata = d;                                                                   \
    while (!NAME``_req_ready) @(negedge clk);                                               \
    @(negedge clk);                                                                         \
    NAME``_req_valid = 0;                                                                   \
    while (!NAME``_resp_valid) @(negedge clk);                                              \
  endtask                                                                                   \
  task automatic NAME``_run();                                                              \
    int unsigned nb, d, len, code, nflip, nplain;                                           \
    bit [GK-1:0] data [8];                                                                  \
    ref_init(GM);                                                                           \
    @(negedge clk); NAME``_cfg_start = 1;                                                   \
    @(negedge clk); NAME``_cfg_start = 0;                                                   \
    while (!NAME``_cfg_done) @(negedge clk);                                                \
    nb = NAME``_nseg;                                                                       \
    check(nb >= 8, $sformatf(`"NAME: %0d blocks`", nb));                                    \
    for (int unsigned b = 0; b < nb; b++) begin                                             \
      code = 32'(NAME``_dut.u_tab.mem[b].code);                                             \
      len = GK + ref_rlen(GTTR + code);                                                     \
      d = 0;                                                                                \
      for (int unsigned n = 0; n < len; n++)                                                \
        if (NAME``_dut.u_nano.open_def[32'(NAME``_dut.u_tab.mem[b].head) + n]) d++;         \
      check(code + 1 >= d / 2 + DELTA_DEF, $sformatf(`"NAME: segment %0d code`", b));       \
    end                                                                                     \
    nflip = 0; nplain = 0;                                                                  \
    for (int unsigned b = 0; b < 8; b++) begin                                              \
      for (int unsigned i = 0; i < GK / 32; i++) data[b][32*i +: 32] = $urandom;            \
      if (b % 3 == 0) data[b] = '0;                                                         \
      NAME``_op(1, b, data[b]);                                                             \
      check(!NAME``_resp_fail, `"NAME: write`");                                            \
      if (NAME``_resp_flip) nflip++; else nplain++;                                         \
    end                                                                                     \
    for (int unsigned b = 0; b < 8; b++) begin                                              \
      NAME``_op(0, b, '0);                                                                  \
      check(!NAME``_resp_fail && NAME``_resp_rdata == data[b],                              \
            $sformatf(`"NAME: read %0d`", b));                                              \
    end                                                                                     \
    check(nflip > 0 && nplain > 0, $sformatf(`"NAME: flipped %0d plain %0d`", nflip, nplain)); \
    $display(`"NAME: %0d blocks, %0d flipped and %0d plain writes`", nb, nflip, nplain);    \
  endtask

  `GROUP_TEST(g2, 11, 1024, 106, 21, 30000)
  `GROUP_TEST(g3, 12, 2048, 198, 29, 40000)

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    g2_run();
    g3_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
