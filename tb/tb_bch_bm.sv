// tb_bch_bm -- self-checking test of the inversionless Berlekamp-Massey
// solver over GF(2^10), t up to 57.
//
// Syndromes of random error patterns of weight e <= t are computed with the
// reference package. The locator must have length e, a non-zero constant
// term, a root at alpha^-p for every error position p, and `done` must come
// 2t + 1 cycles after `start`. Patterns with e > t must not leave a
// locator of length <= t without the fail flag being the honest outcome:
// either fail is set or the length is at most t.
module tb_bch_bm;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int unsigned M = 10, TMAX = 57;
  localparam int unsigned TW = clog2w(TMAX + 1), RW = clog2w(2 * TMAX + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, fail;
  logic [TW-1:0] t;
  logic [M-1:0] syn [2*TMAX];
  logic [M-1:0] lambda [TMAX+1];
  logic [RW-1:0] len;

  int checks = 0, failures = 0;

  bch_bm #(.M(M), .TMAX(TMAX)) dut (.*);

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

  function automatic int unsigned eval_lambda(input int unsigned x);
    int unsigned s, xp;
    s = 0; xp = 1;
    for (int unsigned i = 0; i <= TMAX; i++) begin
      s = s ^ ref_mul(32'(lambda[i]), xp);
      xp = ref_mul(xp, x);
    end
    return s;
  endfunction

  task automatic run(input int unsigned tt, input int unsigned e, input int unsigned ll);
    bit [4095:0] w;
    int unsigned pos [$];
    int unsigned p, cyc, roots;
    w = '0;
    pos.delete();
    while (pos.size() < e) begin
      p = $urandom % ll;
      if (!w[p]) begin w[p] = 1; pos.push_back(p); end
    end
    for (int unsigned j = 1; j <= 2 * TMAX; j++) syn[j-1] = M'(ref_eval(w, ll, j));
    @(negedge clk); start = 1; t = TW'(tt);
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 2 * tt + 1, $sformatf("t=%0d latency %0d", tt, cyc));
    if (e <= tt) begin
      check(32'(len) == e && !fail, $sformatf("t=%0d e=%0d len=%0d fail=%0b", tt, e, len, fail));
      check(lambda[0] != 0, "lambda0");
      roots = 0;
      foreach (pos[i]) if (eval_lambda(ref_alpha(-longint'(pos[i]))) == 0) roots++;
      check(roots == e, $sformatf("t=%0d e=%0d roots %0d", tt, e, roots));
    end else begin
      check(fail || 32'(len) <= tt, "overload length");
    end
  endtask

  initial begin
    start = 0; t = '0;
    foreach (syn[i]) syn[i] = '0;
    ref_init(M);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 0, 522); run(1, 1, 522); run(17, 9, 677); run(17, 17, 677);
    run(40, 33, 887); run(57, 57, 1022); run(57, 1, 1022); run(57, 20, 1022);
    run(10, 30, 612);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
