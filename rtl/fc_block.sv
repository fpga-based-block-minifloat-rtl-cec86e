// fc_block: the fully connected layer engine. It computes one GEMM of a
// training phase: forward (activation x weight^T), error propagation
// (error x weight) or weight gradient (error^T x activation), with 4-bit BM
// operands and a BM result in a low- or high-precision format.
//
// How: feederA and feederB take tiles from the operand buffers and transpose
// them as the selected path needs (path 1: B transposed; path 2: neither;
// path 3: A transposed). Their outputs are joined into one GEMM step stream
// (a step is issued when both feeders have a vector and the kernel is ready)
// and fed to bm_gemm, the systolic BM GEMM kernel with its normalisation.
// feederA supplies the first/last step flags.
//
// Interface: a_* and b_* are tile-row streams (valid/ready) with one shared
// exponent per block; path, k_tiles and the formats are held for a GEMM.
// out_* is the row stream of normalised result tiles with a ReLU mask.
// Timing: a result tile leaves after its last step plus the array drain and
// the normalisation latency of bm_gemm; feeders add one tile of buffering.
//
// From the document: the three paths, the feeders that transpose, and the
// GEMM kernel. The join, the flag generation in the feeder and the square
// tile (TL_R = TL_C) that the transposer needs are this design's choices.
module fc_block
  import bm_pkg::*;
#(
  parameter int unsigned PE_ROWS = 36,
  parameter int unsigned PE_COLS = 24,
  parameter int unsigned BLK     = 12,
  parameter int unsigned KTW     = 8,
  localparam int unsigned TL_R   = 2 * PE_ROWS,
  localparam int unsigned TL_C   = 3 * PE_COLS,
  localparam int unsigned NBR    = TL_R / BLK,
  localparam int unsigned NBC    = TL_C / BLK,
  localparam int unsigned RW     = $clog2(TL_R)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  fc_path_t              path,
  input  logic [KTW-1:0]        k_tiles,
  input  bm_fmt_t               fmt_a,
  input  bm_fmt_t               fmt_b,
  input  bm_fmt_t               out_fmt,
  input  logic                  relu,
  input  logic                  a_valid,
  output logic                  a_ready,
  input  lp_code_t [TL_R-1:0]   a_vec,
  input  beta_t    [NBR-1:0]    a_beta,
  input  logic                  b_valid,
  output logic                  b_ready,
  input  lp_code_t [TL_C-1:0]   b_vec,
  input  beta_t    [NBC-1:0]    b_beta,
  output logic                  out_valid,
  output logic                  out_last,
  output logic [RW-1:0]         out_row,
  output code_t    [TL_C-1:0]   out_code,
  output beta_t    [NBC-1:0]    out_beta,
  output logic     [TL_C-1:0]   out_mask
);
  logic                  fa_valid, fa_ready, fa_first, fa_last;
  logic                  fb_valid, fb_ready, fb_first, fb_last;
  lp_code_t [TL_R-1:0]   fa_vec;
  lp_code_t [TL_C-1:0]   fb_vec;
  beta_t    [NBR-1:0]    fa_beta;
  beta_t    [NBC-1:0]    fb_beta;
  logic                  g_ready;

  bm_feeder #(.N(TL_R), .BLK(BLK), .KTW(KTW)) u_feed_a (
    .clk, .rst_n, .transpose(path == PATH_GRAD), .k_tiles,
    .in_valid(a_valid), .in_ready(a_ready), .in_vec(a_vec), .in_beta(a_beta),
    .out_valid(fa_valid), .out_ready(fa_ready), .out_vec(fa_vec), .out_beta(fa_beta),
    .out_first(fa_first), .out_last(fa_last)
  );

  bm_feeder #(.N(TL_C), .BLK(BLK), .KTW(KTW)) u_feed_b (
    .clk, .rst_n, .transpose(path == PATH_FWD), .k_tiles,
    .in_valid(b_valid), .in_ready(b_ready), .in_vec(b_vec), .in_beta(b_beta),
    .out_valid(fb_valid), .out_ready(fb_ready), .out_vec(fb_vec), .out_beta(fb_beta),
    .out_first(fb_first), .out_last(fb_last)
  );

  assign fa_ready = g_ready && fb_valid;
  assign fb_ready = g_ready && fa_valid;

  bm_gemm #(.PE_ROWS(PE_ROWS), .PE_COLS(PE_COLS), .BLK(BLK)) u_gemm (
    .clk, .rst_n, .fmt_a, .fmt_b, .out_fmt, .relu,
    .in_valid(fa_valid && fb_valid), .in_ready(g_ready),
    .in_first(fa_first), .in_last(fa_last),
    .a_col(fa_vec), .beta_a(fa_beta), .b_row(fb_vec), .beta_b(fb_beta),
    .out_valid, .out_last, .out_row, .out_code, .out_beta, .out_mask
  );

  initial assert (TL_R == TL_C) else $fatal(1, "fc_block needs a square tile");
  // assertions are armed one cycle after reset, from an asynchronously reset flop
  logic chk_arm;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_arm <= 1'b0;
    else        chk_arm <= 1'b1;
  a_feeders_aligned: assert property (@(posedge clk) disable iff (!chk_arm)
    (fa_valid && fb_valid) |-> (fa_first == fb_first && fa_last == fb_last));
endmodule
