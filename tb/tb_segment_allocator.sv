// tb_segment_allocator -- self-checking test of the segment-allocation
// procedure with the full code group (GF(2^10), 512 user bits, t = 17..57,
// Delta = 6) on a 20000-cell array model with 1% open defects and one dense
// defect cluster that no code of the group can cover.
//
// The expected segment list is worked out in the testbench from the array's
// true defect map with the procedure's steps and the reference code lengths.
// Every table write (start cell, code index) and the final segment count must
// match, the cluster must force at least one head skip (step 6), and the
// number of cycles must equal the number of cell probes times the write plus
// read time, plus a small per-attempt overhead.
module tb_segment_allocator;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int unsigned M = 10, K = 512, TMAX = 57, T_TR = 17, DELTA = 6;
  localparam int unsigned CELLS = 20000, NBLK = 256;
  localparam int unsigned AW = clog2w(CELLS), CW = clog2w(TMAX - T_TR + 1), BW = clog2w(NBLK);
  localparam int unsigned NCODES = TMAX - T_TR + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [BW:0] nseg;
  mem_op_e mem_op;
  logic [AW-1:0] mem_addr;
  logic mem_wdata, mem_ack, mem_rdata;
  logic tab_we;
  logic [BW-1:0] tab_addr;
  logic [AW-1:0] tab_head;
  logic [CW-1:0] tab_code;

  int checks = 0, failures = 0;

  segment_allocator #(.M(M), .K(K), .TMAX(TMAX), .T_TR(T_TR), .DELTA(DELTA),
                      .CELLS(CELLS), .NBLK(NBLK)) dut (.*);
  nano_array #(.CELLS(CELLS), .P_BIT_PPM(10000), .P_TF_PPM(0), .SEED(11)) u_mem (
    .clk, .rst_n, .op(mem_op), .addr(mem_addr), .wdata(mem_wdata), .ack(mem_ack),
    .rdata(mem_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned exp_head [$], exp_code [$], got_head [$], got_code [$];
  int unsigned probes, skips, attempts;

  // reference run of the allocation procedure
  task automatic reference();
    int unsigned len [NCODES];
    int unsigned head, tail, need, ndef, i;
    int first;
    bit fin;
    for (int unsigned c = 0; c < NCODES; c++) len[c] = K + ref_rlen(T_TR + c);
    head = 0; fin = 0; probes = 0; skips = 0; attempts = 0;
    while (!fin) begin
      i = 0; tail = head; ndef = 0; first = -1; need = len[0];
      attempts++;
      forever begin
        for (int unsigned c = 0; c < need; c++) begin
          if (tail >= CELLS) begin fin = 1; break; end
          probes++;
          if (u_mem.open_def[tail]) begin
            ndef++;
            if (first < 0) first = int'(tail);
          end
          tail++;
        end
        if (fin) break;
        if (i >= ndef / 2 + DELTA) begin
          exp_head.push_back(head); exp_code.push_back(i);
          head = tail;
          if (exp_head.size() >= NBLK) fin = 1;
          break;
        end else if (i + 1 < NCODES) begin
          i++;
          need = len[i] - len[i-1];
        end else begin
          head = (first >= 0) ? first + 1 : tail;
          skips++;
          break;
        end
      end
    end
  endtask

  always @(posedge clk) if (tab_we) begin
    got_head.push_back(32'(tab_head));
    got_code.push_back(32'(tab_code));
    check(32'(tab_addr) == got_head.size() - 1, "table address order");
  end

  initial begin
    int unsigned cyc, mism;
    start = 0;
    ref_init(M);
    repeat (3) @(negedge clk);
    // a cluster of 80 open cells in a row
    for (int unsigned c = 5000; c < 5080; c++) u_mem.open_def[c] = 1;
    rst_n = 1;
    reference();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(32'(nseg) == exp_head.size(), $sformatf("nseg %0d vs %0d", nseg, exp_head.size()));
    check(got_head.size() == exp_head.size(), "number of table writes");
    mism = 0;
    foreach (exp_head[k])
      if (k < got_head.size() && (got_head[k] != exp_head[k] || got_code[k] != exp_code[k])) begin
        mism++;
        if (mism < 5) $display("  seg %0d: got %0d/%0d exp %0d/%0d", k, got_head[k], got_code[k],
                               exp_head[k], exp_code[k]);
      end
    check(mism == 0, $sformatf("%0d segments differ", mism));
    check(skips >= 1, "cluster forced a head skip");
    // each probe = write (20) + read (1); per code step and attempt a few cycles
    check(cyc >= probes * 21 && cyc <= probes * 21 + 50 * attempts + 20 * NCODES * attempts,
          $sformatf("cycles %0d for %0d probes", cyc, probes));
    $display("segments %0d, probes %0d, head skips %0d, cycles %0d", nseg, probes, skips, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
