// tb_nano_array -- self-checking test of the nanodevice array model.
//
// Instance A (10% open defects, no transient faults): cells written with 1
// read 1; cells written with 0 read 0 except open cells, which read 1 on every
// pass; the open fraction is near 10%. Instance B (no defects, 5% transient
// faults): about 5% of reads come back wrong. Every write must take WLAT
// cycles and every read RLAT cycles.
module tb_nano_array;
  import ddft_pkg::*;

  localparam int unsigned CELLS = 4096, AW = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_op_e op_a, op_b;
  logic [AW-1:0] addr_a, addr_b;
  logic wdata_a, wdata_b, ack_a, ack_b, rdata_a, rdata_b;

  int checks = 0, failures = 0;

  nano_array #(.CELLS(CELLS), .P_BIT_PPM(100000), .P_TF_PPM(0), .WLAT(20), .RLAT(1), .SEED(7))
    u_a (.clk, .rst_n, .op(op_a), .addr(addr_a), .wdata(wdata_a), .ack(ack_a), .rdata(rdata_a));
  nano_array #(.CELLS(CELLS), .P_BIT_PPM(0), .P_TF_PPM(50000), .WLAT(3), .RLAT(2), .SEED(3))
    u_b (.clk, .rst_n, .op(op_b), .addr(addr_b), .wdata(wdata_b), .ack(ack_b), .rdata(rdata_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one access on port A; returns the read value and the cycles taken
  task automatic acc_a(input mem_op_e op, input int unsigned a, input logic wd,
                       output logic rd, output int unsigned cyc);
    op_a = op; addr_a = AW'(a); wdata_a = wd; cyc = 1;
    #1;
    while (!ack_a) begin @(negedge clk); cyc++; end
    rd = rdata_a;
    @(negedge clk);
    op_a = MEM_IDLE;
  endtask

  task automatic acc_b(input mem_op_e op, input int unsigned a, input logic wd,
                       output logic rd, output int unsigned cyc);
    op_b = op; addr_b = AW'(a); wdata_b = wd; cyc = 1;
    #1;
    while (!ack_b) begin @(negedge clk); cyc++; end
    rd = rdata_b;
    @(negedge clk);
    op_b = MEM_IDLE;
  endtask

  bit open1 [CELLS];
  int unsigned nopen, bad_lat, bad_one, bad_rep, wrong;

  initial begin
    logic rd;
    int unsigned cyc;
    op_a = MEM_IDLE; op_b = MEM_IDLE; addr_a = '0; addr_b = '0; wdata_a = 0; wdata_b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    nopen = 0; bad_lat = 0; bad_one = 0; bad_rep = 0;
    // pass 1: write 0, read
    for (int unsigned i = 0; i < CELLS; i++) begin
      acc_a(MEM_WRITE, i, 0, rd, cyc); if (cyc != 20) bad_lat++;
      acc_a(MEM_READ, i, 0, rd, cyc);  if (cyc != 1) bad_lat++;
      open1[i] = rd;
      if (rd) nopen++;
    end
    // pass 2: write 1 to even cells, 0 to odd cells
    for (int unsigned i = 0; i < CELLS; i++) begin
      acc_a(MEM_WRITE, i, (i % 2 == 0), rd, cyc);
      acc_a(MEM_READ, i, 0, rd, cyc);
      if (i % 2 == 0 && !rd) bad_one++;
      if (i % 2 == 1 && rd != open1[i]) bad_rep++;
    end
    check(bad_lat == 0, $sformatf("%0d accesses with wrong latency", bad_lat));
    check(bad_one == 0, $sformatf("%0d cells lost a 1", bad_one));
    check(bad_rep == 0, $sformatf("%0d cells changed defect state", bad_rep));
    check(nopen > CELLS * 7 / 100 && nopen < CELLS * 13 / 100,
          $sformatf("open fraction %0d / %0d", nopen, CELLS));
    // port B: transient faults
    wrong = 0;
    for (int unsigned i = 0; i < CELLS; i++) begin
      acc_b(MEM_WRITE, i, (i % 3 == 0), rd, cyc); if (cyc != 3) bad_lat++;
      acc_b(MEM_READ, i, 0, rd, cyc);             if (cyc != 2) bad_lat++;
      if (rd != (i % 3 == 0)) wrong++;
    end
    check(bad_lat == 0, "port B latency");
    check(wrong > CELLS * 3 / 100 && wrong < CELLS * 7 / 100,
          $sformatf("transient fraction %0d / %0d", wrong, CELLS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
