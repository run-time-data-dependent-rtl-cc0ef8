// tb_bch_genpoly -- self-checking test of the run-time generator-polynomial
// unit over GF(2^10) with t up to 57.
//
// For a spread of t it compares g(x) and its degree with the reference
// product of (x + alpha^e) over the cyclotomic cosets, and checks that the
// result is ready within 2t + deg + 2 cycles. It also checks the known
// parity lengths of the group (165 bits at t = 17, 510 at t = 57).
module tb_bch_genpoly;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int unsigned M = 10, TMAX = 57;
  localparam int unsigned RMAX = bch_rlen(TMAX, M);
  localparam int unsigned TW = clog2w(TMAX + 1), DW = clog2w(RMAX + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [TW-1:0] t;
  logic [RMAX:0] g;
  logic [DW-1:0] deg;

  int checks = 0, failures = 0;

  bch_genpoly #(.M(M), .TMAX(TMAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned tt);
    bit [4095:0] gr;
    int unsigned dr, cyc;
    dr = ref_genpoly(tt, gr);
    @(negedge clk); start = 1; t = TW'(tt);
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(32'(deg) == dr, $sformatf("t=%0d deg %0d vs %0d", tt, deg, dr));
    check(g == gr[RMAX:0], $sformatf("t=%0d polynomial", tt));
    check(cyc <= 2 * tt + dr + 2, $sformatf("t=%0d took %0d cycles", tt, cyc));
    if (tt == 17) check(dr == 165, "t=17 parity length");
    if (tt == 57) check(dr == 510, "t=57 parity length");
  endtask

  initial begin
    start = 0; t = '0;
    ref_init(M);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1); run(2); run(3); run(17); run(5); run(33); run(40); run(57); run(57); run(18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
