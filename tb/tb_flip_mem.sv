// tb_flip_mem -- self-checking test of the per-block flip-bit memory.
//
// After reset every bit must read 0. Random writes are mirrored in a local
// array and random reads compared one cycle after the address.
module tb_flip_mem;
  localparam int unsigned NBLK = 256, BW = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we, wbit, rbit;
  logic [BW-1:0] waddr, raddr;
  bit model [NBLK];
  int checks = 0, failures = 0;

  flip_mem #(.NBLK(NBLK)) dut (.*);

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a;
    we = 0; wbit = 0; waddr = '0; raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int unsigned i = 0; i < NBLK; i++) begin
      raddr = BW'(i);
      @(negedge clk);
      checks++;
      if (rbit != 0) begin failures++; $display("FAIL: bit %0d not reset", i); end
    end
    for (int unsigned i = 0; i < 2000; i++) begin
      if ($urandom % 2) begin
        a = $urandom % NBLK;
        we = 1; waddr = BW'(a); wbit = 1'($urandom); model[a] = wbit;
      end else we = 0;
      a = $urandom % NBLK;
      raddr = BW'(a);
      @(negedge clk);
      if (!(we && waddr == raddr)) begin
        checks++;
        if (rbit != model[a]) begin failures++; $display("FAIL: bit %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
