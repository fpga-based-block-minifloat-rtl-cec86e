// bm_vec_unit: block minifloat vector addition unit.
//
// Adds (or subtracts) two BM blocks element-wise and converts the result to
// a chosen BM format. It serves the residual addition/subtraction, the error
// addition of the two N-BEATS branches, the SGD weight update
// W' = W - alpha * g, and the precision conversion (Cvt) of a block.
//
// A block is BLK x BLK elements, received as BLK beats of LANES = BLK
// elements, with one shared exponent per operand block (taken on the first
// beat). Step 1 (per beat): both operands are turned into integers, the one
// with the smaller exponent is shifted right by |beta_b - beta_a| (the
// operand with the larger exponent gets W_TAIL guard bits), they are added
// and the result R goes to the block buffer R[BLK^2] while the running
// maximum |R| is kept; the output exponent is beta_c = max(beta_a, beta_b').
// Step 2: if R_max does not fit the output format, Z_shift raises the
// exponent; ADD Norm then converts the BLK beats to the output format with
// round-to-nearest or, for weight updates, stochastic rounding fed by one
// LFSR per lane.
//
//   op = VOP_ADD  : a + b          op = VOP_CVT  : a  (Cvt)
//   op = VOP_SUB  : a - b          op = VOP_NCVT : -a (Cvt of a negated block)
//   b_shift       : b is scaled by 2^-b_shift (SGD learning rate alpha)
//
// Handshake: in_valid/in_ready for input beats, out_valid for output beats
// (no back-pressure). The unit holds one block: it accepts BLK beats, then
// emits BLK beats (out_last on the last one), then accepts again.
// The guard bits, the power-of-two learning rate and the per-lane LFSRs
// are this design's choices.
module bm_vec_unit
  import bm_pkg::*;
#(
  parameter int unsigned BLK    = 12,
  parameter int unsigned W_TAIL = 4,
  localparam int unsigned LANES = BLK,
  localparam int unsigned RW    = 1 + 1 + 16 + W_TAIL    // sign, carry, magnitude, guard
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  vec_op_t              op,
  input  bm_fmt_t              fmt_a,
  input  bm_fmt_t              fmt_b,
  input  bm_fmt_t              fmt_o,
  input  logic                 stoch,       // stochastic rounding
  input  logic [4:0]           b_shift,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  code_t [LANES-1:0]    a_code,
  input  beta_t                beta_a,
  input  code_t [LANES-1:0]    b_code,
  input  beta_t                beta_b,
  output logic                 out_valid,
  output logic                 out_last,
  output code_t [LANES-1:0]    out_code,
  output beta_t                out_beta
);
  typedef enum logic [1:0] {S_IN, S_CAL, S_OUT} state_t;
  state_t state;

  localparam int unsigned BW = $clog2(BLK + 1);
  logic [BW-1:0]         beat;
  logic signed [RW-1:0]  rbuf [BLK][LANES];
  logic [RW-1:0]         rmax;
  beta_t                 bc_q, bo_q;
  logic [5:0]            zs_q;

  // ---------------- step 1: align and add -------------------------------
  beta_t                 bb_eff, bc;
  int                    da, db;
  logic signed [RW-1:0]  r [LANES];
  logic [RW-1:0]         rmax_d;
  logic                  use_b;

  assign use_b = (op == VOP_ADD) || (op == VOP_SUB);

  always_comb begin
    bb_eff = beta_b - beta_t'(b_shift);
    bc     = (!use_b || beta_a >= bb_eff) ? beta_a : bb_eff;
    if (beat != '0) bc = bc_q;                 // exponents are taken on beat 0
    da = int'(bc) - int'(beta_a);
    db = int'(bc) - int'(bb_eff);
    if (da > int'(RW) - 1) da = int'(RW) - 1;
    if (db > int'(RW) - 1) db = int'(RW) - 1;
    rmax_d = (beat == '0) ? '0 : rmax;
    for (int l = 0; l < LANES; l++) begin
      logic signed [RW-1:0] ia, ib;
      ia = (RW'(bm_to_int(a_code[l], fmt_a)) <<< W_TAIL) >>> da;
      ib = (RW'(bm_to_int(b_code[l], fmt_b)) <<< W_TAIL) >>> db;
      unique case (op)
        VOP_ADD:  r[l] = ia + ib;
        VOP_SUB:  r[l] = ia - ib;
        VOP_CVT:  r[l] = ia;
        default:  r[l] = -ia;
      endcase
      if ((r[l][RW-1] ? RW'(-r[l]) : RW'(r[l])) > rmax_d)
        rmax_d = r[l][RW-1] ? RW'(-r[l]) : RW'(r[l]);
    end
  end

  assign in_ready = (state == S_IN);

  // ---------------- LFSRs for stochastic rounding -----------------------
  logic [15:0] rnd [LANES];
  for (genvar l = 0; l < LANES; l++) begin : g_rng
    lfsr #(.SEED(16'hACE1 ^ 16'(l * 16'h1F35))) u_lfsr (
      .clk(clk), .rst_n(rst_n), .en(state == S_OUT), .rnd(rnd[l]));
  end

  // ---------------- control and step 2 -----------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IN;
      beat      <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_IN: if (in_valid) begin
          if (beat == BW'(BLK - 1)) begin beat <= '0; state <= S_CAL; end
          else beat <= beat + 1'b1;
        end
        S_CAL: state <= S_OUT;
        S_OUT: begin
          out_valid <= 1'b1;
          out_last  <= (beat == BW'(BLK - 1));
          if (beat == BW'(BLK - 1)) begin beat <= '0; state <= S_IN; end
          else beat <= beat + 1'b1;
        end
        default: state <= S_IN;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IN && in_valid) begin
      for (int l = 0; l < LANES; l++) rbuf[beat][l] <= r[l];
      rmax <= rmax_d;
      if (beat == '0) bc_q <= bc;
    end
    if (state == S_CAL) begin
      int unsigned z;
      z    = bm_zshift(NMAG_W'(rmax), fmt_o, W_TAIL);
      zs_q <= 6'(z);
      bo_q <= bc_q - beta_t'(W_TAIL) + beta_t'(z);
    end
    if (state == S_OUT) begin
      out_beta <= bo_q;
      for (int l = 0; l < LANES; l++) begin
        logic signed [RW-1:0] v;
        v = rbuf[beat][l];
        out_code[l] <= bm_encode(v[RW-1], NMAG_W'(v[RW-1] ? RW'(-v) : RW'(v)), int'(zs_q),
                                 fmt_o, stoch, rnd[l]);
      end
    end
  end
endmodule
