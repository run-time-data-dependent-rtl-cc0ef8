// tb_seg_table -- self-checking test of the segment configuration memory.
//
// Fills every entry with random (head, code) pairs, then reads them back in a
// random order, checking each value one cycle after its address, and checks
// that a later write to one entry leaves the others unchanged.
module tb_seg_table;
  import ddft_pkg::*;

  localparam int unsigned NBLK = 256, AW = 17, CW = 6, BW = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [BW-1:0] waddr, raddr;
  logic [AW-1:0] whead, rhead;
  logic [CW-1:0] wcode, rcode;

  logic [AW-1:0] mh [NBLK];
  logic [CW-1:0] mc [NBLK];
  int checks = 0, failures = 0;

  seg_table #(.NBLK(NBLK), .AW(AW), .CW(CW)) dut (.*);

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input int unsigned a);
    raddr = BW'(a);
    @(negedge clk);
    checks++;
    if (rhead != mh[a] || rcode != mc[a]) begin
      failures++;
      $display("FAIL: entry %0d read %0h/%0h expected %0h/%0h", a, rhead, rcode, mh[a], mc[a]);
    end
  endtask

  initial begin
    we = 0; waddr = '0; raddr = '0; whead = '0; wcode = '0;
    @(negedge clk);
    for (int unsigned i = 0; i < NBLK; i++) begin
      mh[i] = AW'($urandom); mc[i] = CW'($urandom);
      we = 1; waddr = BW'(i); whead = mh[i]; wcode = mc[i];
      @(negedge clk);
    end
    we = 0;
    for (int unsigned i = 0; i < 300; i++) rd($urandom % NBLK);
    mh[5] = ~mh[5]; mc[5] = ~mc[5];
    we = 1; waddr = 5; whead = mh[5]; wcode = mc[5];
    @(negedge clk);
    we = 0;
    for (int unsigned i = 0; i < 10; i++) rd(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
