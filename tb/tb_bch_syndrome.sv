// tb_bch_syndrome -- self-checking test of the bit-serial syndrome unit over
// GF(2^10) with 2*57 syndromes.
//
// Random words of several lengths stream in highest degree first (with idle
// cycles in between bits); all 114 syndromes must equal the reference
// evaluation r(alpha^j). `clear` must zero them between words.
module tb_bch_syndrome;
  import ddft_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int unsigned M = 10, TMAX = 57;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, in_valid, in_bit;
  logic [M-1:0] syn [2*TMAX];

  int checks = 0, failures = 0;

  bch_syndrome #(.M(M), .TMAX(TMAX)) dut (.*);

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

  task automatic run(input int unsigned ll, input int unsigned weight_pct);
    bit [4095:0] w;
    int unsigned bad;
    w = '0;
    for (int unsigned i = 0; i < ll; i++) w[i] = ($urandom % 100) < weight_pct;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = int'(ll) - 1; i >= 0; i--) begin
      in_valid = 1; in_bit = w[i];
      @(negedge clk);
      if ($urandom % 8 == 0) begin in_valid = 0; in_bit = 1; @(negedge clk); end
    end
    in_valid = 0;
    @(negedge clk);
    bad = 0;
    for (int unsigned j = 1; j <= 2 * TMAX; j++)
      if (32'(syn[j-1]) != ref_eval(w, ll, j)) bad++;
    check(bad == 0, $sformatf("l=%0d: %0d syndromes wrong", ll, bad));
  endtask

  initial begin
    clear = 0; in_valid = 0; in_bit = 0;
    ref_init(M);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(522, 50); run(1022, 50); run(700, 2); run(1022, 0); run(900, 98);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    begin
      bit allz;
      allz = 1;
      for (int unsigned j = 0; j < 2 * TMAX; j++) if (syn[j] != 0) allz = 0;
      check(allz, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
