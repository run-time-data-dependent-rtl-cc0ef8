// ddft_pkg -- shared constants, types and Galois-field helpers of the
// data-dependent defect-tolerant hybrid memory.
//
// The memory stores K-bit user blocks in segments of a nanodevice cell array.
// Each segment holds one codeword of a shortened narrow-sense binary BCH code
// over GF(2^M). All codes of a code group share the same field and the same
// encoder/decoder and differ only in their correction capability t. Code
// index i of the group has t = T_TR + i, so i is also the number of errors the
// code leaves for defects (t_def); T_TR errors are kept for transient faults.
//
// The defaults are the first code group of the published evaluation (GF(2^10),
// n_max = 1023, t_max = 57, 512 user bits). T_TR = 17 is the smallest t_tr
// satisfying the block-error bound for a 1023-bit word at a transient fault
// rate of 1e-3 and a target block error rate of 1e-15; it is this design's
// own evaluation of that bound. The helper functions are pure and usable both
// at elaboration (constants) and in synthesizable logic.
package ddft_pkg;

  // ---------------------------------------------------------------- defaults
  localparam int unsigned M_DEF      = 10;      // GF(2^10), group I
  localparam int unsigned K_DEF      = 512;     // user bits per block
  localparam int unsigned TMAX_DEF   = 57;      // t_max of group I
  localparam int unsigned T_TR_DEF   = 17;      // errors kept for transient faults
  localparam int unsigned DELTA_DEF  = 6;       // trade-off parameter Delta
  localparam int unsigned CELLS_DEF  = 128450;  // (1-0.3)^2 * 512 * 512 usable cells
  localparam int unsigned NBLK_DEF   = 256;     // logical block addresses
  localparam int unsigned WLAT_DEF   = 20;      // cycles per cell write
  localparam int unsigned RLAT_DEF   = 1;       // cycles per cell read

  // --------------------------------------------- nanodevice array port types
  typedef enum logic [1:0] {MEM_IDLE = 2'd0, MEM_WRITE = 2'd1, MEM_READ = 2'd2} mem_op_e;

  // ---------------------------------------------------------- field helpers
  // Primitive polynomial of GF(2^m), bit m included.
  function automatic logic [16:0] prim_poly(input int unsigned m);
    case (m)
      3:       return 17'h0000b;  // x^3+x+1
      4:       return 17'h00013;  // x^4+x+1
      5:       return 17'h00025;  // x^5+x^2+1
      6:       return 17'h00043;  // x^6+x+1
      7:       return 17'h00089;  // x^7+x^3+1
      8:       return 17'h0011d;  // x^8+x^4+x^3+x^2+1
      9:       return 17'h00211;  // x^9+x^4+1
      10:      return 17'h00409;  // x^10+x^3+1
      11:      return 17'h00805;  // x^11+x^2+1
      12:      return 17'h01053;  // x^12+x^6+x^4+x+1
      default: return 17'h00409;
    endcase
  endfunction

  // Product of two elements of GF(2^m) in polynomial basis.
  function automatic logic [15:0] gf_mul(input logic [15:0] a, input logic [15:0] b,
                                         input int unsigned m);
    logic [16:0] prim;
    logic [16:0] aa;
    logic [15:0] p;
    prim = prim_poly(m);
    aa   = {1'b0, a};
    p    = '0;
    for (int unsigned i = 0; i < 16; i++) begin
      if (i < m && b[i]) p = p ^ aa[15:0];
      aa = aa << 1;
      if (aa[m]) aa = aa ^ prim;
    end
    return p;
  endfunction

  // a^e in GF(2^m) by square and multiply.
  function automatic logic [15:0] gf_pow(input logic [15:0] a, input int unsigned e,
                                         input int unsigned m);
    logic [15:0] r;
    logic [15:0] s;
    r = 16'd1;
    s = a;
    for (int unsigned i = 0; i < 32; i++) begin
      if (e[i]) r = gf_mul(r, s, m);
      s = gf_mul(s, s, m);
    end
    return r;
  endfunction

  // alpha^e, alpha being the root of the primitive polynomial (element 2).
  function automatic logic [15:0] gf_alpha(input int unsigned e, input int unsigned m);
    return gf_pow(16'd2, e % ((1 << m) - 1), m);
  endfunction

  // ------------------------------------------------- cyclotomic coset helpers
  // Multiplying an exponent by 2 modulo 2^m-1 rotates its m-bit pattern.
  function automatic logic [15:0] rot1(input logic [15:0] j, input int unsigned m);
    logic [15:0] mask;
    mask = 16'((32'd1 << m) - 1);
    return ((j << 1) | (j >> (m - 1))) & mask;
  endfunction

  // Degree added to the generator polynomial by the minimal polynomial of
  // alpha^j: the coset size if j leads its cyclotomic coset, else 0.
  function automatic int unsigned coset_incr(input logic [15:0] j, input int unsigned m);
    logic [15:0] x;
    int unsigned size;
    logic leader;
    x      = j;
    size   = 0;
    leader = 1'b1;
    for (int unsigned k = 1; k <= 16; k++) begin
      if (k <= m) begin
        x = rot1(x, m);
        if (x < j) leader = 1'b0;
        if (x == j && size == 0) size = k;
      end
    end
    return leader ? size : 0;
  endfunction

  // Number of parity bits of the t-error-correcting narrow-sense BCH code.
  function automatic int unsigned bch_rlen(input int unsigned t, input int unsigned m);
    int unsigned r;
    r = 0;
    for (int unsigned i = 1; i <= t; i++) r += coset_incr(16'(2 * i - 1), m);
    return r;
  endfunction

  // Ceiling log2, at least 1.
  function automatic int unsigned clog2w(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
