// segment_allocator -- builds the segment map of the nanodevice array.
//
// At configuration time it cuts the usable cells into consecutive segments,
// each just long enough for a codeword of the weakest code of the group that
// can still handle the worst data/defect match in it. Head and tail pointers
// walk the array:
//   1. start with the weakest code, i = 0, and an empty segment at head;
//   2. extend the tail by the extra length of code i over code i-1;
//   3. count the open defects N_def in [head, tail);
//   4. if t_def(i) >= floor(N_def/2) + DELTA, the segment is found: store
//      (head, i) for the next logical address and restart at head = tail;
//   5. otherwise try the next stronger code; when none is left,
//   6. move head just past the first defective cell of the attempt and
//      restart at step 1.
// It stops when the tail would leave the array or every logical address is
// used. Code i of the group has t = T_TR + i, hence t_def(i) = i. Its length
// grows from the weakest code by the degree of each new minimal polynomial,
// worked out here with the coset rule, so no length table is stored.
//
// Defects are found by probing each cell as the tail passes it: write 0,
// read back; a 1 marks an open defect. The procedure (steps 1-6) follows the
// design; the write-0/read probe, the half-open [head, tail) reading of the
// pointers and the restart of the tail at the new head in step 6 are this
// implementation's own choices.
//
// Interface: pulse `start`; `busy` is high until `done` pulses; `nseg` then
// holds the number of logical blocks. Table writes come out on `tab_*`;
// the cell port (`mem_*`) follows the nano_array protocol.
module segment_allocator
  import ddft_pkg::*;
#(
  parameter int unsigned M     = M_DEF,
  parameter int unsigned K     = K_DEF,
  parameter int unsigned TMAX  = TMAX_DEF,
  parameter int unsigned T_TR  = T_TR_DEF,
  parameter int unsigned DELTA = DELTA_DEF,
  parameter int unsigned CELLS = CELLS_DEF,
  parameter int unsigned NBLK  = NBLK_DEF,
  parameter int unsigned AW    = clog2w(CELLS),
  parameter int unsigned CW    = clog2w(TMAX - T_TR + 1),
  parameter int unsigned BW    = clog2w(NBLK)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [BW:0]   nseg,
  // cell port
  output mem_op_e       mem_op,
  output logic [AW-1:0] mem_addr,
  output logic          mem_wdata,
  input  logic          mem_ack,
  input  logic          mem_rdata,
  // segment table write port
  output logic          tab_we,
  output logic [BW-1:0] tab_addr,
  output logic [AW-1:0] tab_head,
  output logic [CW-1:0] tab_code
);

  localparam int unsigned NCODES = TMAX - T_TR + 1;
  localparam int unsigned L0     = K + bch_rlen(T_TR, M);
  localparam int unsigned LW     = clog2w(K + bch_rlen(TMAX, M) + 1);

  typedef enum logic [2:0] {A_IDLE, A_STEP1, A_PROBE_W, A_PROBE_R, A_CHECK, A_DONE} astate_e;
  astate_e state;

  logic [AW:0]   head, tail, first_def;
  logic          have_def;
  logic [LW-1:0] remaining;   // cells still to add for code i
  logic [LW-1:0] ndef;
  logic [CW-1:0] i_code;
  logic          fits;
  logic [LW-1:0] next_incr;   // extra length of code i+1 over code i

  always_comb begin
    fits      = 32'(i_code) >= 32'(ndef >> 1) + DELTA;
    next_incr = LW'(coset_incr(16'(2 * (T_TR + 32'(i_code) + 1) - 1), M));
  end

  assign busy      = (state != A_IDLE);
  assign mem_op    = (state == A_PROBE_W) && remaining != 0 && 32'(tail) < CELLS ? MEM_WRITE
                   : (state == A_PROBE_R) ? MEM_READ : MEM_IDLE;
  assign mem_addr  = tail[AW-1:0];
  assign mem_wdata = 1'b0;
  assign tab_we    = (state == A_CHECK) && fits;
  assign tab_addr  = nseg[BW-1:0];
  assign tab_head  = head[AW-1:0];
  assign tab_code  = i_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= A_IDLE;
      head      <= '0;
      tail      <= '0;
      first_def <= '0;
      have_def  <= 1'b0;
      remaining <= '0;
      ndef      <= '0;
      i_code    <= '0;
      nseg      <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        A_IDLE: if (start) begin
          head  <= '0;
          nseg  <= '0;
          state <= A_STEP1;
        end
        A_STEP1: begin
          i_code    <= '0;
          tail      <= head;
          remaining <= LW'(L0);
          ndef      <= '0;
          have_def  <= 1'b0;
          state     <= A_PROBE_W;
        end
        A_PROBE_W: begin
          if (remaining == 0)            state <= A_CHECK;
          else if (32'(tail) >= CELLS)   state <= A_DONE;
          else if (mem_ack)              state <= A_PROBE_R;
        end
        A_PROBE_R: if (mem_ack) begin
          if (mem_rdata) begin
            ndef <= ndef + 1'b1;
            if (!have_def) begin
              have_def  <= 1'b1;
              first_def <= tail;
            end
          end
          tail      <= tail + 1'b1;
          remaining <= remaining - 1'b1;
          state     <= A_PROBE_W;
        end
        A_CHECK: begin
          if (fits) begin
            nseg  <= nseg + 1'b1;
            head  <= tail;
            state <= (32'(nseg) + 1 >= NBLK) ? A_DONE : A_STEP1;
          end else if (32'(i_code) + 1 < NCODES) begin
            i_code    <= i_code + 1'b1;
            remaining <= next_incr;
            state     <= A_PROBE_W;
          end else begin
            head  <= have_def ? first_def + 1'b1 : tail;
            state <= A_STEP1;
          end
        end
        A_DONE: begin
          done  <= 1'b1;
          state <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
