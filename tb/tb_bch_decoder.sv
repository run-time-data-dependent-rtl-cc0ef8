// tb_bch_decoder -- self-checking test of the shared BCH decoder at full size
// (GF(2^10), 512 user bits, t up to 57).
//
// Codewords come from the reference package (its own generator polynomial and
// long division). For several codes of the group it adds 0..t random errors
// and checks the returned user bits, the number of corrected errors, the
// failure flag and the latency after the last bit (2t + l + 5 cycles). A word
// with many more errors than t must not come back as a clean success with the
// wrong data.
module tb_bch_decoder;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int unsigned M = 10, K = 512, TMAX = 57;
  localparam int unsigned RMAX = bch_rlen(TMAX, M);
  localparam int unsigned LMAX = K + RMAX;
  localparam int unsigned LW = clog2w(LMAX + 1), TW = clog2w(TMAX + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, in_bit, busy, done, fail;
  logic [TW-1:0] t;
  logic [LW-1:0] l, nerr;
  logic [K-1:0] data;

  int checks = 0, failures = 0;

  bch_decoder #(.M(M), .K(K), .TMAX(TMAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned tt, input int unsigned nerr_in);
    bit [4095:0] g, cw, rx, d;
    int unsigned r, ll, pos, cyc;
    bit used [4096];
    r  = ref_genpoly(tt, g);
    ll = K + r;
    d  = '0;
    for (int unsigned i = 0; i < K; i++) d[i] = 1'($urandom);
    cw = ref_encode(d, K, g, r);
    rx = cw;
    for (int unsigned i = 0; i < ll; i++) used[i] = 0;
    for (int unsigned e = 0; e < nerr_in; e++) begin
      do pos = $urandom % ll; while (used[pos]);
      used[pos] = 1;
      rx[pos] = ~rx[pos];
    end
    @(negedge clk);
    start = 1; t = TW'(tt); l = LW'(ll);
    @(negedge clk);
    start = 0;
    for (int i = int'(ll) - 1; i >= 0; i--) begin
      in_valid = 1; in_bit = rx[i];
      @(negedge clk);
      // an idle cycle now and then
      if (($urandom % 16) == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    if (nerr_in <= tt) begin
      check(!fail, $sformatf("t=%0d e=%0d: fail flag", tt, nerr_in));
      check(data == d[K-1:0], $sformatf("t=%0d e=%0d: data", tt, nerr_in));
      check(32'(nerr) == nerr_in, $sformatf("t=%0d e=%0d: nerr=%0d", tt, nerr_in, nerr));
      check(cyc + 1 == 2 * tt + ll + 5, $sformatf("t=%0d: latency %0d", tt, cyc + 1));
    end else begin
      check(fail || data != d[K-1:0] || 32'(nerr) <= tt,
            $sformatf("t=%0d e=%0d: overload reported as clean", tt, nerr_in));
      check(fail || 32'(nerr) <= tt, "overload: nerr above t without fail");
    end
  endtask

  initial begin
    start = 0; in_valid = 0; in_bit = 0; t = '0; l = '0;
    ref_init(M);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 0); run(1, 1);
    run(17, 0); run(17, 5); run(17, 17);
    run(23, 11); run(23, 23);
    run(40, 39); run(40, 40);
    run(57, 0); run(57, 30); run(57, 57);
    run(57, 80); run(17, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
