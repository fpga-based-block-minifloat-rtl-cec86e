// dsp_pack_mul: six significand multiplications in one DSP multiply.
//
// Two A significands and three B significands (unsigned, at most 4 bits, and
// never both operands of a pair 4 bits wide) are placed in the DSP's A and B
// inputs with 21-bit and 7-bit spacing:
//
//   A = a0 + a1 * 2^21                    (25 bits)
//   B = b0 + b1 * 2^7 + b2 * 2^14          (18 bits)
//
// so that every partial product a_i * b_j (at most 15 * 7 = 105, 7 bits)
// lands in its own 7-bit field of the 43-bit product and no carry crosses a
// field:  P[7k+6:7k] = a_(k/3) * b_(k%3),  k = 0..5.
// A 25 x 18 product fits one 27 x 18 DSP48E2 multiplier. The bit layout
// follows the packing scheme of the design; signs are handled outside.
// One register stage after the multiply (latency 1 cycle).
module dsp_pack_mul (
  input  logic            clk,
  input  logic [1:0][3:0] a,      // two A-side significands
  input  logic [2:0][3:0] b,      // three B-side significands
  output logic [5:0][6:0] p       // p[3*i+j] = a[i] * b[j]
);
  logic [24:0] pa;
  logic [17:0] pb;
  logic [42:0] prod, prod_q;

  always_comb begin
    pa   = 25'(a[0]) | (25'(a[1]) << 21);
    pb   = 18'(b[0]) | (18'(b[1]) << 7) | (18'(b[2]) << 14);
    prod = 43'(pa) * 43'(pb);
  end

  always_ff @(posedge clk) prod_q <= prod;

  always_comb
    for (int k = 0; k < 6; k++) p[k] = prod_q[7*k +: 7];
endmodule
