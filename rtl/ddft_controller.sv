// ddft_controller -- block write/read controller with conditional bit flipping.
//
// This is the run-time half of data-dependent defect tolerance. An open
// defect always reads 1, so it only causes an error where a 0 is stored. A
// segment whose code leaves t_def >= floor(d/2) errors for its d defects can
// therefore always hold either a codeword or its bit-wise complement within
// budget. The controller tries the plain word first:
//   write: look the block up (segment head, code index i, t = T_TR + i,
//          t_def = i); get g(x) for t; encode the K user bits into the l-bit
//          codeword; write it to cells head .. head+l-1; read it back and
//          count the mismatches N_err; if N_err > t_def, write the inverted
//          codeword over it (write-read-write instead of write-read); store
//          the 1-bit flip decision in the flip memory;
//   read:  look the block and its flip bit up; read the l cells, invert them
//          if the flip bit is set, BCH-decode and return the user bits.
// One generator-polynomial unit, encoder and decoder are shared by all codes;
// the last polynomial is kept, so consecutive accesses with the same t skip
// its computation.
//
// Host interface: present a request with `req_valid` (`req_write`,
// `req_addr`, `req_wdata`); it is taken in a cycle with `req_ready`.
// `resp_valid` pulses when the operation ends, with `resp_rdata`,
// `resp_nerr` (write: N_err of the first read-back; read: bits corrected),
// `resp_flip` (the block's flip bit) and `resp_fail` (decoding failure, or an
// address at or beyond `nseg`). The statistics counters feed write time and
// energy estimates. The cell port follows the nano_array protocol; one cell
// is accessed at a time, so a write costs l*(WLAT+RLAT) cycles, plus l*WLAT
// when flipped, besides encoding (l cycles) and the polynomial (if new).
//
// The procedure follows the published scheme. The bit-serial codec, the caching of
// g(x), the handshakes and the counting of N_err by comparing the read-back
// word with the codeword kept in the controller are this implementation's
// choices.
module ddft_controller
  import ddft_pkg::*;
#(
  parameter int unsigned M     = M_DEF,
  parameter int unsigned K     = K_DEF,
  parameter int unsigned TMAX  = TMAX_DEF,
  parameter int unsigned T_TR  = T_TR_DEF,
  parameter int unsigned CELLS = CELLS_DEF,
  parameter int unsigned NBLK  = NBLK_DEF,
  parameter int unsigned AW    = clog2w(CELLS),
  parameter int unsigned CW    = clog2w(TMAX - T_TR + 1),
  parameter int unsigned BW    = clog2w(NBLK),
  parameter int unsigned RMAX  = bch_rlen(TMAX, M),
  parameter int unsigned LMAX  = K + RMAX,
  parameter int unsigned LW    = clog2w(LMAX + 1),
  parameter int unsigned TW    = clog2w(TMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [BW:0]   nseg,
  // host side
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_write,
  input  logic [BW-1:0] req_addr,
  input  logic [K-1:0]  req_wdata,
  output logic          resp_valid,
  output logic [K-1:0]  resp_rdata,
  output logic [LW-1:0] resp_nerr,
  output logic          resp_flip,
  output logic          resp_fail,
  // segment table read port
  output logic [BW-1:0] tab_raddr,
  input  logic [AW-1:0] tab_rhead,
  input  logic [CW-1:0] tab_rcode,
  // flip memory
  output logic          flip_we,
  output logic [BW-1:0] flip_addr,
  output logic          flip_wbit,
  input  logic          flip_rbit,
  // cell port
  output mem_op_e       mem_op,
  output logic [AW-1:0] mem_addr,
  output logic          mem_wdata,
  input  logic          mem_ack,
  input  logic          mem_rdata,
  // statistics
  output logic [31:0]   st_writes,
  output logic [31:0]   st_flips,
  output logic [31:0]   st_reads,
  output logic [31:0]   st_cell_writes,
  output logic [31:0]   st_cell_reads
);

  typedef enum logic [3:0] {
    C_IDLE, C_LOOKUP, C_LOOKUP2, C_GPSTART, C_GP, C_ENC, C_WRITE, C_VERIFY, C_DECIDE,
    C_REWRITE, C_COMMIT, C_RDSTART, C_READ, C_DECODE, C_RESP
  } cstate_e;
  cstate_e state;

  logic          write_q;
  logic [BW-1:0] addr_q;
  logic [K-1:0]  wdata_q;
  logic [AW-1:0] head_q;
  logic [CW-1:0] code_q;
  logic          flip_q;
  logic [LMAX-1:0] cw;        // codeword, cw[n] = n-th bit in storage order
  logic [LW-1:0] n;           // cell index within the segment
  logic [LW-1:0] nerr_q;
  logic          fail_q;

  // cached generator polynomial
  logic          gp_valid;
  logic [TW-1:0] gp_t_q;

  logic          gp_start, gp_busy, gp_done;
  logic [TW-1:0] t_cur;
  logic [RMAX:0] gp_g;
  logic [clog2w(RMAX + 1)-1:0] gp_deg;
  logic [LW-1:0] l_cur;

  logic          enc_start, enc_busy, enc_valid, enc_bit, enc_last;
  logic          dec_start, dec_busy, dec_done, dec_fail;
  logic [K-1:0]  dec_data;
  logic [LW-1:0] dec_nerr;

  assign t_cur = TW'(T_TR) + TW'(code_q);
  assign l_cur = LW'(K) + LW'(gp_deg);

  bch_genpoly #(.M(M), .TMAX(TMAX), .RMAX(RMAX)) u_gp (
    .clk, .rst_n, .start(gp_start), .t(t_cur), .busy(gp_busy), .done(gp_done),
    .g(gp_g), .deg(gp_deg));

  bch_encoder #(.M(M), .K(K), .TMAX(TMAX), .RMAX(RMAX)) u_enc (
    .clk, .rst_n, .start(enc_start), .data(wdata_q), .g(gp_g), .r(gp_deg),
    .busy(enc_busy), .out_valid(enc_valid), .out_bit(enc_bit), .out_last(enc_last),
    .out_ready(1'b1));

  bch_decoder #(.M(M), .K(K), .TMAX(TMAX), .RMAX(RMAX), .LMAX(LMAX)) u_dec (
    .clk, .rst_n, .start(dec_start), .t(t_cur), .l(l_cur),
    .in_valid(state == C_READ && mem_ack), .in_bit(mem_rdata ^ flip_q),
    .busy(dec_busy), .done(dec_done), .data(dec_data), .nerr(dec_nerr), .fail(dec_fail));

  logic need_gp;
  assign need_gp   = !gp_valid || gp_t_q != t_cur;
  assign gp_start  = (state == C_GPSTART) && need_gp;
  assign enc_start = (state == C_ENC) && !enc_busy;
  assign dec_start = (state == C_RDSTART);

  assign req_ready = (state == C_IDLE);
  assign tab_raddr = addr_q;
  assign flip_addr = addr_q;
  assign flip_we   = (state == C_COMMIT);
  assign flip_wbit = flip_q;

  always_comb begin
    mem_op    = MEM_IDLE;
    mem_wdata = cw[n] ^ flip_q;
    case (state)
      C_WRITE, C_REWRITE: mem_op = MEM_WRITE;
      C_VERIFY, C_READ:   mem_op = MEM_READ;
      default:            mem_op = MEM_IDLE;
    endcase
  end
  assign mem_addr = head_q + AW'(n);

  logic last_cell;
  assign last_cell = (n + 1'b1 == l_cur);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      write_q    <= 1'b0;
      addr_q     <= '0;
      wdata_q    <= '0;
      head_q     <= '0;
      code_q     <= '0;
      flip_q     <= 1'b0;
      cw         <= '0;
      n          <= '0;
      nerr_q     <= '0;
      fail_q     <= 1'b0;
      gp_valid   <= 1'b0;
      gp_t_q     <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      resp_nerr  <= '0;
      resp_flip  <= 1'b0;
      resp_fail  <= 1'b0;
      st_writes  <= '0;
      st_flips   <= '0;
      st_reads   <= '0;
      st_cell_writes <= '0;
      st_cell_reads  <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (mem_ack && mem_op == MEM_WRITE) st_cell_writes <= st_cell_writes + 1;
      if (mem_ack && mem_op == MEM_READ)  st_cell_reads  <= st_cell_reads + 1;
      case (state)
        C_IDLE: if (req_valid) begin
          write_q <= req_write;
          addr_q  <= req_addr;
          wdata_q <= req_wdata;
          fail_q  <= ({1'b0, req_addr} >= nseg);
          state   <= C_LOOKUP;
        end
        C_LOOKUP: state <= C_LOOKUP2;          // table and flip memory read
        C_LOOKUP2: begin
          head_q <= tab_rhead;
          code_q <= tab_rcode;
          flip_q <= write_q ? 1'b0 : flip_rbit;
          if (fail_q) state <= C_RESP;
          else        state <= C_GPSTART;
        end
        C_GPSTART: state <= C_GP;              // polynomial unit started if needed
        C_GP: begin
          if (!need_gp || gp_done) begin
            gp_valid <= 1'b1;
            gp_t_q   <= t_cur;
            n        <= '0;
            nerr_q   <= '0;
            state    <= write_q ? C_ENC : C_RDSTART;
          end
        end
        C_ENC: if (enc_valid) begin
          cw[n] <= enc_bit;
          n     <= n + 1'b1;
          if (enc_last) begin
            n     <= '0;
            state <= C_WRITE;
          end
        end
        C_WRITE: if (mem_ack) begin
          n <= n + 1'b1;
          if (last_cell) begin
            n     <= '0;
            state <= C_VERIFY;
          end
        end
        C_VERIFY: if (mem_ack) begin
          if (mem_rdata != cw[n]) nerr_q <= nerr_q + 1'b1;
          n <= n + 1'b1;
          if (last_cell) begin
            n     <= '0;
            state <= C_DECIDE;
          end
        end
        C_DECIDE: begin
          st_writes <= st_writes + 1;
          if (32'(nerr_q) > 32'(code_q)) begin
            flip_q   <= 1'b1;
            st_flips <= st_flips + 1;
            state    <= C_REWRITE;
          end else begin
            state <= C_COMMIT;
          end
        end
        C_REWRITE: if (mem_ack) begin
          n <= n + 1'b1;
          if (last_cell) begin
            n     <= '0;
            state <= C_COMMIT;
          end
        end
        C_COMMIT: state <= C_RESP;
        C_RDSTART: state <= C_READ;
        C_READ: if (mem_ack) begin
          n <= n + 1'b1;
          if (last_cell) begin
            n     <= '0;
            state <= C_DECODE;
          end
        end
        C_DECODE: if (dec_done) begin
          st_reads <= st_reads + 1;
          state    <= C_RESP;
        end
        C_RESP: begin
          resp_valid <= 1'b1;
          resp_flip  <= flip_q;
          resp_fail  <= fail_q || (!write_q && dec_fail);
          resp_nerr  <= write_q ? nerr_q : dec_nerr;
          resp_rdata <= write_q ? '0 : dec_data;
          state      <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
