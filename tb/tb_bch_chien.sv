// tb_bch_chien -- self-checking test of the Chien search over GF(2^10).
//
// The locator is built by the reference package as the product of
// (1 + alpha^p x) over chosen positions p (times a random non-zero scale).
// The search must flag exactly those positions, in order p = 0 .. l-1 one per
// cycle, count them in `nroots` and pulse `done` l cycles after the start.
module tb_bch_chien;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int unsigned M = 10, TMAX = 57, K = 512;
  localparam int unsigned LMAX = K + bch_rlen(TMAX, M);
  localparam int unsigned LW = clog2w(LMAX + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, err_valid, err, done;
  logic [LW-1:0] l, pos, nroots;
  logic [M-1:0] lambda [TMAX+1];

  int checks = 0, failures = 0;

  bch_chien #(.M(M), .TMAX(TMAX), .LMAX(LMAX)) dut (.*);

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

  task automatic run(input int unsigned e, input int unsigned ll);
    bit [4095:0] w, flagged;
    int unsigned lp [TMAX+1];
    int unsigned p, cyc, n, scale;
    w = '0;
    n = 0;
    for (int unsigned i = 0; i <= TMAX; i++) lp[i] = 0;
    scale = 1 + $urandom % 1023;
    lp[0] = scale;
    while (n < e) begin
      p = $urandom % ll;
      if (!w[p]) begin
        w[p] = 1;
        n++;
        for (int i = int'(n); i >= 0; i--)
          lp[i] = ((i > 0) ? ref_mul(lp[i-1], ref_alpha(p)) : 0) ^ ((i < int'(n)) ? lp[i] : 0);
      end
    end
    foreach (lambda[i]) lambda[i] = M'(lp[i]);
    @(negedge clk); start = 1; l = LW'(ll);
    @(negedge clk); start = 0; cyc = 1;
    flagged = '0;
    n = 0;
    while (!done && cyc < 4 * ll) begin
      if (err_valid) begin
        if (32'(pos) != n) check(0, "position order");
        if (err) flagged[pos] = 1;
        n++;
      end
      @(negedge clk); cyc++;
    end
    check(flagged == w, $sformatf("e=%0d l=%0d error positions", e, ll));
    check(32'(nroots) == e, $sformatf("nroots %0d vs %0d", nroots, e));
    check(cyc == ll + 1, $sformatf("l=%0d: done after %0d cycles", ll, cyc));
  endtask

  initial begin
    start = 0; l = '0;
    foreach (lambda[i]) lambda[i] = '0;
    ref_init(M);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 522); run(1, 522); run(5, 677); run(17, 677); run(40, 887); run(57, 1022);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
