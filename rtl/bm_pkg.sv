// bm_pkg: types, constants and arithmetic helpers shared by every block of
// the block minifloat (BM) training accelerator.
//
// Number representation used throughout the RTL
// ----------------------------------------------
// A BM element of format <e,m> has one sign bit, e exponent bits E and m
// mantissa bits M (an "unsigned" format drops the sign bit). The RTL works on
// the integer value of an element rather than on its real value:
//
//     I = M                       when E == 0  (denormal; always so for e = 0)
//     I = (2^m + M) << (E - 1)    when E != 0  (normal)
//
// and a block of elements shares one signed exponent beta, so that an element
// is worth (-1)^s * I * 2^beta. This is the minifloat definition (normal and
// denormal numbers, no Inf/NaN, saturation instead of overflow) with the
// format's constant bias folded into beta, so that beta is always the weight
// of the least significant integer bit. All GEMM and vector arithmetic is done
// on these integers, as in the integer-based accumulation of the design.
//
// Code layout: M in bits [m-1:0], E in bits [e+m-1:m], sign in bit [e+m]
// (absent for unsigned formats). Zero is always coded with sign 0.
//
// The helpers here implement the normalisation step (find the leading one of
// the block maximum, choose a right shift Z_shift that keeps the maximum
// representable, then round each element to the target format with
// saturation), with either round-to-nearest or stochastic rounding.
package bm_pkg;

  // Width of a shared exponent (two's complement).
  parameter int BETA_W = 10;
  // Width of the widest element code: the high-precision format BM<0,15>.
  parameter int CODE_W = 16;
  // Width of a low-precision element code (4-bit BM).
  parameter int LP_W = 4;
  // Width of the magnitudes the normalisation helpers accept.
  parameter int NMAG_W = 48;

  typedef logic signed [BETA_W-1:0] beta_t;
  typedef logic [CODE_W-1:0]        code_t;
  typedef logic [LP_W-1:0]          lp_code_t;

  // A run-time selectable element format <e,m>; uns = 1 drops the sign bit.
  typedef struct packed {
    logic       uns;
    logic [1:0] e;
    logic [3:0] m;
  } bm_fmt_t;

  // Formats of the mixed-precision 4-bit configuration and the
  // high-precision residual format.
  localparam bm_fmt_t FMT_0_3  = '{uns: 1'b0, e: 2'd0, m: 4'd3};   // input, error, gradient
  localparam bm_fmt_t FMT_1_2  = '{uns: 1'b0, e: 2'd1, m: 4'd2};
  localparam bm_fmt_t FMT_2_1  = '{uns: 1'b0, e: 2'd2, m: 4'd1};   // weight
  localparam bm_fmt_t FMT_U0_4 = '{uns: 1'b1, e: 2'd0, m: 4'd4};   // activation (after ReLU)
  localparam bm_fmt_t FMT_0_15 = '{uns: 1'b0, e: 2'd0, m: 4'd15};  // high precision

  // Training phases served by the FC block (paths 1 to 3 of the FC block).
  typedef enum logic [1:0] {
    PATH_FWD  = 2'd0,   // A_{k-1} x W^T
    PATH_ERR  = 2'd1,   // e_k x W
    PATH_GRAD = 2'd2    // (e_k)^T x A_{k-1}
  } fc_path_t;

  // Operations of the BM vector unit.
  typedef enum logic [2:0] {
    VOP_ADD  = 3'd0,    // a + b          (residual / error addition)
    VOP_SUB  = 3'd1,    // a - b          (residual subtraction, SGD)
    VOP_CVT  = 3'd2,    // a              (precision conversion)
    VOP_NCVT = 3'd3     // -a             (negated conversion)
  } vec_op_t;

  // Number of magnitude bits of the largest integer value of a format.
  function automatic int unsigned fmt_maxbits(input bm_fmt_t f);
    if (f.e == 2'd0) return int'(f.m);
    return int'(f.m) + (1 << f.e) - 1;
  endfunction

  // Position of the most significant set bit, -1 for zero.
  function automatic int msb_pos(input logic [NMAG_W-1:0] v);
    int p;
    p = -1;
    for (int i = 0; i < NMAG_W; i++) if (v[i]) p = i;
    return p;
  endfunction

  // Integer value (signed) of an element code.
  function automatic logic signed [17:0] bm_to_int(input code_t c, input bm_fmt_t f);
    logic [15:0] mant, ex, mag;
    logic        s;
    mant = c & ((16'd1 << f.m) - 16'd1);
    ex   = (c >> f.m) & ((16'd1 << f.e) - 16'd1);
    s    = f.uns ? 1'b0 : c[f.e + f.m];
    if (ex == 16'd0) mag = mant;
    else             mag = ((16'd1 << f.m) | mant) << (ex - 16'd1);
    return s ? -$signed({2'b00, mag}) : $signed({2'b00, mag});
  endfunction

  // Right shift that keeps the block maximum pmax representable in format f.
  // zmin is the smallest shift allowed.
  function automatic int unsigned bm_zshift(input logic [NMAG_W-1:0] pmax,
                                            input bm_fmt_t f, input int unsigned zmin);
    int nb, z;
    nb = msb_pos(pmax) + 1;
    z  = nb - int'(fmt_maxbits(f));
    if (z < int'(zmin)) z = int'(zmin);
    return int'(unsigned'(z));
  endfunction

  // Rounding increment for a right shift by s: half an output LSB for
  // round-to-nearest, or s random bits for stochastic rounding.
  function automatic logic [NMAG_W:0] rnd_inc(input int unsigned s, input logic stoch,
                                              input logic [15:0] rbits);
    logic [NMAG_W:0] r;
    if (s == 0) return '0;
    if (stoch) begin
      r = {1'b0, rbits, {(NMAG_W-16){1'b0}}} >> (NMAG_W - int'(s));
      return r;
    end
    return {{NMAG_W{1'b0}}, 1'b1} << (s - 1);
  endfunction

  // Algorithm-1 normalisation: sign/magnitude of an integer whose LSB weight
  // is 2^beta, shifted right by zs (output LSB weight 2^(beta+zs)), encoded
  // in format f with rounding and saturation.
  function automatic code_t bm_encode(input logic sign, input logic [NMAG_W-1:0] mag,
                                      input int unsigned zs, input bm_fmt_t f,
                                      input logic stoch, input logic [15:0] rbits);
    logic [NMAG_W-1:0] t;
    logic [NMAG_W:0]   q;
    int                p, m, e;
    int unsigned       s;
    logic [15:0]       ex, mant;
    code_t             c;
    m = int'(f.m);
    e = int'(f.e);
    t = mag >> zs;
    p = msb_pos(t);
    if (e == 0 || p < m) s = zs;
    else                 s = zs + unsigned'(p - m);
    q = ({1'b0, mag} + rnd_inc(s, stoch, rbits)) >> s;
    if (e == 0) begin
      ex = '0;
      if (q > NMAG_W'((1 << m) - 1)) q = NMAG_W'((1 << m) - 1);
      mant = q[15:0];
    end else if (p < m) begin
      if (q < NMAG_W'(1 << m)) begin ex = '0;    mant = q[15:0]; end
      else                     begin ex = 16'd1; mant = '0;      end
    end else begin
      ex = 16'(p - m + 1);
      if (q >= NMAG_W'(1 << (m + 1))) begin q = q >> 1; ex = ex + 16'd1; end
      mant = 16'(q - NMAG_W'(1 << m));
      if (ex > 16'((1 << e) - 1)) begin
        ex   = 16'((1 << e) - 1);
        mant = 16'((1 << m) - 1);
      end
    end
    c = (ex << m) | mant;
    if (f.uns) begin
      if (sign) c = '0;
    end else if (sign && c != '0) begin
      c = c | (code_t'(1) << (e + m));
    end
    return c;
  endfunction

endpackage
