// tb_bch_encoder -- self-checking test of the bit-serial BCH encoder over
// GF(2^10) with 512 user bits.
//
// The generator polynomial is fed from the reference package. The streamed
// word must equal the reference systematic codeword bit for bit, have zero
// syndromes S_1..S_2t (evaluated independently), assert out_last on its
// last bit only, and take exactly K + r cycles when out_ready stays high.
// A second pass stalls out_ready at random and must give the same word.
module tb_bch_encoder;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int unsigned M = 10, K = 512, TMAX = 57;
  localparam int unsigned RMAX = bch_rlen(TMAX, M);
  localparam int unsigned DW = clog2w(RMAX + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, out_valid, out_bit, out_last, out_ready;
  logic [K-1:0] data;
  logic [RMAX:0] g;
  logic [DW-1:0] r;

  int checks = 0, failures = 0;

  bch_encoder #(.M(M), .K(K), .TMAX(TMAX)) dut (.*);

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

  task automatic run(input int unsigned tt, input bit stall);
    bit [4095:0] gr, d, cw, got;
    int unsigned dr, ll, n, cyc, lasts;
    bit zero_syn;
    dr = ref_genpoly(tt, gr);
    ll = K + dr;
    d = '0;
    for (int unsigned i = 0; i < K; i++) d[i] = 1'($urandom);
    cw = ref_encode(d, K, gr, dr);
    @(negedge clk);
    g = gr[RMAX:0]; r = DW'(dr); data = d[K-1:0]; start = 1; out_ready = 1;
    @(negedge clk); start = 0;
    n = 0; cyc = 0; lasts = 0; got = '0;
    while (n < ll && cyc < 10 * ll) begin
      out_ready = stall ? 1'($urandom % 3 != 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        got[ll - 1 - n] = out_bit;
        if (out_last) lasts++;
        if (out_last) check(n == ll - 1, "out_last early");
        n++;
      end
      @(negedge clk);
      cyc++;
    end
    check(got == cw, $sformatf("t=%0d codeword", tt));
    zero_syn = 1;
    for (int unsigned j = 1; j <= 2 * tt; j++) if (ref_eval(got, ll, j) != 0) zero_syn = 0;
    check(zero_syn, $sformatf("t=%0d syndromes", tt));
    check(lasts == 1, "one out_last");
    if (!stall) check(cyc == ll, $sformatf("t=%0d cycles %0d vs %0d", tt, cyc, ll));
    check(!busy, "idle after word");
  endtask

  initial begin
    start = 0; out_ready = 1; data = '0; g = '0; r = '0;
    ref_init(M);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 0); run(17, 0); run(23, 1); run(40, 0); run(57, 0); run(57, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
