// bm_pe: DSP-packed processing element of the BM GEMM kernel.
//
// One PE holds six MAC units arranged as 2 output rows x 3 output columns.
// Each cycle it takes two A elements (column k of two rows of A) from the
// left and three B elements (row k of three columns of B) from the top,
// together with the shared exponents of their blocks, and
//   1. decodes the five 4-bit codes (mixed-precision decoders, run-time
//      formats fmt_a / fmt_b),
//   2. multiplies the six significand pairs in one packed DSP multiply,
//   3. shifts each product by the exponent sum and applies the sign (LUTs),
//   4. adds it into its accumulator, aligned with beta_comp (FMA and
//      inter-block accumulation merged into one step).
// A and B operands, their formats and exponents and the step control are
// registered and passed to the right / bottom neighbours (output-stationary
// systolic flow), so the formats may change from one tile to the next.
//
// Accumulators are ACC_W-bit two's complement integers with W_TAIL fraction
// bits; their LSB weight is 2^(ref - W_TAIL). On the step flagged `last` the
// final sums and the block exponent are copied to a two-row shadow register
// that forms part of a per-column drain shift chain (Reg block): while
// `drain_shift` is high each row moves one place down, the bottom row leaving
// on dr_out. The next tile can accumulate while the chain drains.
//
// Timing: operands in at cycle t, products at t+1, accumulator/shadow update
// at the end of t+1. The caller never asserts drain_shift in the cycle a
// shadow is loaded.
module bm_pe
  import bm_pkg::*;
#(
  parameter int unsigned ACC_W  = 23,
  parameter int unsigned W_TAIL = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  bm_fmt_t                   fmt_a,       // format of a_in (travels with it)
  input  bm_fmt_t                   fmt_b,       // format of b_in (travels with it)
  output bm_fmt_t                   fmt_a_out,
  output bm_fmt_t                   fmt_b_out,
  // west side: A operands and step control
  input  logic                      v_in,
  input  logic                      first_in,
  input  logic                      last_in,
  input  lp_code_t [1:0]            a_in,
  input  beta_t                     beta_a_in,
  output logic                      v_out,
  output logic                      first_out,
  output logic                      last_out,
  output lp_code_t [1:0]            a_out,
  output beta_t                     beta_a_out,
  // north side: B operands
  input  lp_code_t [2:0]            b_in,
  input  beta_t                     beta_b_in,
  output lp_code_t [2:0]            b_out,
  output beta_t                     beta_b_out,
  // drain chain (one MAC row of three sums plus its exponent per stage)
  input  logic                      drain_shift,
  input  logic signed [2:0][ACC_W-1:0] dr_val_in,
  input  beta_t                     dr_ref_in,
  output logic signed [2:0][ACC_W-1:0] dr_val_out,
  output beta_t                     dr_ref_out,
  output logic                      captured      // shadow loaded this cycle
);
  // ---------------- stage 0: decode and packed multiply ------------------
  logic [1:0]       sa;
  logic [1:0][3:0]  siga;
  logic [1:0][1:0]  sha;
  logic [2:0]       sb;
  logic [2:0][3:0]  sigb;
  logic [2:0][1:0]  shb;

  for (genvar i = 0; i < 2; i++) begin : g_deca
    bm_decoder u_dec (.code(a_in[i]), .fmt(fmt_a), .sign(sa[i]), .sig(siga[i]), .shift(sha[i]));
  end
  for (genvar j = 0; j < 3; j++) begin : g_decb
    bm_decoder u_dec (.code(b_in[j]), .fmt(fmt_b), .sign(sb[j]), .sig(sigb[j]), .shift(shb[j]));
  end

  logic [5:0][6:0] prod;
  dsp_pack_mul u_mul (.clk(clk), .a(siga), .b(sigb), .p(prod));

  // stage-1 copies of what travels beside the multiply
  logic            v1, first1, last1;
  logic [5:0]      neg1;
  logic [5:0][2:0] sh1;
  beta_t           ba1, bb1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0;
      v_out <= 1'b0; first_out <= 1'b0; last_out <= 1'b0;
    end else begin
      v1 <= v_in; first1 <= first_in; last1 <= last_in;
      v_out <= v_in; first_out <= first_in; last_out <= last_in;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 3; j++) begin
        neg1[3*i+j] <= sa[i] ^ sb[j];
        sh1[3*i+j]  <= 3'(sha[i]) + 3'(shb[j]);
      end
    ba1        <= beta_a_in;
    bb1        <= beta_b_in;
    a_out      <= a_in;
    fmt_a_out  <= fmt_a;
    fmt_b_out  <= fmt_b;
    beta_a_out <= beta_a_in;
    b_out      <= b_in;
    beta_b_out <= beta_b_in;
  end

  // ---------------- stage 1: align and accumulate -------------------------
  logic [5:0] acc_sh, term_sh;
  beta_t      ref_q, ref_d;
  beta_comp #(.MAXSH(ACC_W - 1)) u_beta (
    .clk(clk), .en(v1), .first(first1), .beta_a(ba1), .beta_b(bb1),
    .acc_shift(acc_sh), .term_shift(term_sh), .ref_q(ref_q), .ref_d(ref_d));

  logic signed [ACC_W-1:0] acc [6];
  logic signed [ACC_W-1:0] acc_d [6];
  logic signed [ACC_W-1:0] term;

  always_comb begin
    for (int k = 0; k < 6; k++) begin
      term = ACC_W'(prod[k]) << (int'(sh1[k]) + int'(W_TAIL));
      if (neg1[k]) term = -term;
      if (first1) acc_d[k] = term;
      else        acc_d[k] = (acc[k] >>> acc_sh) + (term >>> term_sh);
    end
  end

  always_ff @(posedge clk)
    if (v1) for (int k = 0; k < 6; k++) acc[k] <= acc_d[k];

  // ---------------- shadow registers / drain chain ------------------------
  logic signed [2:0][ACC_W-1:0] shv [2];
  beta_t                        shr [2];

  assign captured = v1 & last1;

  always_ff @(posedge clk) begin
    if (captured) begin
      for (int r = 0; r < 2; r++) begin
        for (int c = 0; c < 3; c++) shv[r][c] <= acc_d[3*r+c];
        shr[r] <= ref_d;
      end
    end else if (drain_shift) begin
      shv[1] <= shv[0];
      shr[1] <= shr[0];
      shv[0] <= dr_val_in;
      shr[0] <= dr_ref_in;
    end
  end

  assign dr_val_out = shv[1];
  assign dr_ref_out = shr[1];

  // the packed multiplier fields are 7 bits: two 4-bit significands must
  // never meet in one product
  // assertions are armed one cycle after reset, from an asynchronously reset flop
  logic chk_arm;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_arm <= 1'b0;
    else        chk_arm <= 1'b1;
  a_not_both_unsigned: assert property (@(posedge clk) disable iff (!chk_arm)
    v_in |-> !(fmt_a.uns && fmt_b.uns))
    else $error("bm_pe: both operands use the 4-bit unsigned format");
endmodule
