// bm_decoder: mixed-precision decoder (DEC) of the GEMM PE.
//
// Splits a 4-bit BM element code into its sign, its integer significand and
// the left shift that its exponent implies, for a format <e,m> chosen at run
// time. The significand goes to the packed multiplier and the shift is added
// in LUT logic, so that the integer value of the element is
// (-1)^sign * sig << shift (see bm_pkg for the integer convention).
//
//   e = 0 : sig = M, shift = 0            (BM<0,3>, or unsigned BM<0,4>)
//   e > 0 : denormal E = 0 -> sig = M,     shift = 0
//           normal   E > 0 -> sig = 1.M,   shift = E - 1
//
// Supported formats are the 4-bit ones with e <= 2 (BM<0,3>, BM<1,2>,
// BM<2,1>, unsigned BM<0,4>), which bound sig to 4 bits and shift to 2.
// The decoder is the design's own reading of "an extra mixed precision
// decoder ... according to different precision configurations".
// Purely combinational.
module bm_decoder
  import bm_pkg::*;
(
  input  lp_code_t   code,
  input  bm_fmt_t    fmt,
  output logic       sign,
  output logic [3:0] sig,
  output logic [1:0] shift
);
  logic [3:0] mant, ex;

  always_comb begin
    mant  = code & ((4'd1 << fmt.m) - 4'd1);
    ex    = (code >> fmt.m) & ((4'd1 << fmt.e) - 4'd1);
    sign  = fmt.uns ? 1'b0 : code[fmt.e + fmt.m];
    if (ex == 4'd0) begin
      sig   = mant;
      shift = 2'd0;
    end else begin
      sig   = (4'd1 << fmt.m) | mant;
      shift = 2'(ex - 4'd1);
    end
    // a zero significand never carries a sign
    if (sig == 4'd0) sign = 1'b0;
  end
endmodule
