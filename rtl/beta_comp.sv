// beta_comp: shared-exponent computation for one group of accumulators.
//
// Every step of an inner product multiplies elements of an A block (shared
// exponent beta_a) and a B block (beta_b); the step's terms are worth
// 2^(beta_a + beta_b) per integer LSB. The accumulators keep one running
// reference exponent `ref_q`, the largest step exponent seen so far:
//
//   first step : ref <= s                      (no alignment)
//   s >  ref   : ref <= s, accumulator >>>= s - ref   (acc_shift)
//   s <= ref   : new term >>>= ref - s                (term_shift)
//
// where s = beta_a + beta_b. Within one block s is constant, so the shifts
// are only non-zero at block boundaries (inter-block accumulation). At the
// end ref_d of the last step is the output block's exponent before normalisation. Shifts are
// clamped to MAXSH. The running-maximum rule is this design's choice; the
// document only says that the unit produces the output exponent and the
// alignment offsets. Registered ref, combinational shift outputs.
module beta_comp
  import bm_pkg::*;
#(
  parameter int unsigned MAXSH = 31
) (
  input  logic        clk,
  input  logic        en,          // a step is applied this cycle
  input  logic        first,       // first step of a new accumulation
  input  beta_t       beta_a,
  input  beta_t       beta_b,
  output logic [5:0]  acc_shift,   // right shift for the accumulators
  output logic [5:0]  term_shift,  // right shift for this step's terms
  output beta_t       ref_q,       // current reference exponent
  output beta_t       ref_d        // reference exponent after this step
);
  beta_t s;
  int    d;

  always_comb begin
    s = beta_a + beta_b;
    d = int'(s) - int'(ref_q);
    acc_shift  = '0;
    term_shift = '0;
    if (!first) begin
      if (d > 0) acc_shift  = (d > int'(MAXSH))  ? 6'(MAXSH) : 6'(d);
      else       term_shift = (-d > int'(MAXSH)) ? 6'(MAXSH) : 6'(-d);
    end
  end

  assign ref_d = (first || d > 0) ? s : ref_q;

  always_ff @(posedge clk)
    if (en) ref_q <= ref_d;
endmodule
